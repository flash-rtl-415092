// process_control_tb: sends random updates over the four-phase handshake to
// process_control, answered by a stand-in for process_modify with a random
// delay and error flag. Checks that exactly one command reaches the back end
// per update, with the type and triple unchanged, that the error flag comes
// back with the acknowledge, and the handshake order.
module process_control_tb;
  import flash_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic upd_req = 0, upd_ack, upd_err;
  upd_type_e upd_type = UPD_CREATE;
  upd_params_t upd_params = '0;
  logic pm_start, pm_done = 0, pm_err = 0;
  upd_cmd_t pm_cmd;

  process_control dut (.*);

  always #5 clk = ~clk;

  int n_cmds = 0, wait_cnt = 0;
  logic busy = 0, want_err = 0;
  upd_cmd_t got_cmd;
  always @(posedge clk) begin
    pm_done <= 0;
    if (rst_n && pm_start) begin
      checks++;
      if (busy) begin failures++; $display("FAIL start while busy"); end
      got_cmd = pm_cmd;
      n_cmds++;
      busy <= 1; wait_cnt <= $urandom % 5; want_err <= $urandom % 2;
    end else if (busy) begin
      if (wait_cnt == 0) begin pm_done <= 1; pm_err <= want_err; busy <= 0; end
      else wait_cnt <= wait_cnt - 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int n0, n;
      upd_cmd_t exp;
      @(negedge clk);
      n0 = n_cmds;
      upd_type = upd_type_e'($urandom % 4);
      upd_params = '{pid: pid_t'($urandom), rsvd: 0, prio: prio_t'($urandom % 40),
                     state: task_state_e'($urandom % 2)};
      exp = '{kind: upd_type, params: upd_params};
      upd_req = 1;
      n = 0;
      while (!upd_ack && n < 50) begin @(negedge clk); n++; end
      checks++;
      if (!upd_ack) begin failures++; $display("FAIL no ack"); end
      checks++;
      if (n_cmds != n0 + 1 || got_cmd !== exp) begin
        failures++; $display("FAIL command %h expected %h (count %0d)", got_cmd, exp, n_cmds - n0);
      end
      checks++;
      if (upd_err !== pm_err) begin failures++; $display("FAIL err %0d expected %0d", upd_err, pm_err); end
      // change inputs while acknowledged: must not start a new command
      upd_params = '1;
      repeat ($urandom % 4) @(negedge clk);
      upd_req = 0;
      @(negedge clk);
      checks++;
      if (upd_ack || n_cmds != n0 + 1) begin failures++; $display("FAIL ack stayed up or extra command"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
