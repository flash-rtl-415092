// sched_control_tb: runs sched_control against a stand-in selection unit
// that answers after a random delay with a PID chosen here. Checks the
// four-phase request handshake (result valid with ack, ack drops after req),
// that a tick raises the interrupt only after its selection is done and holds
// it until cleared, that a tick arriving during a request is served after it,
// that a request wins over a pending tick, and that the runtime passed on is
// NS_PER_CYCLE times the cycles between selection starts.
module sched_control_tb;
  import flash_pkg::*;
  localparam int NS = 20;
  int checks = 0, failures = 0;
  int n_pending = 0;

  logic clk = 0, rst_n = 0;
  logic sched_req = 0, sched_ack, next_valid, tick = 0, tick_irq, tick_irq_clr = 0;
  pid_t next_pid;
  logic gnt_start, gnt_done = 0, gnt_found = 0;
  rt_t  gnt_delta_ns;
  pid_t gnt_pid = 0;

  sched_control #(.NS_PER_CYCLE(NS)) dut (.*);

  always #5 clk = ~clk;

  // stand-in for get_next_task: answer after a random delay
  int   cyc = 0, last_start = -1, n_starts = 0;
  pid_t ans_pid = 0;
  logic ans_found = 0;
  logic busy = 0;
  int   wait_cnt = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    gnt_done <= 0;
    if (rst_n && gnt_start) begin
      checks++;
      if (busy) begin failures++; $display("FAIL start while busy"); end
      if (last_start >= 0) begin
        checks++;
        if (gnt_delta_ns !== rt_t'((cyc - last_start) * NS)) begin
          failures++; $display("FAIL delta %0d expected %0d", gnt_delta_ns, (cyc - last_start) * NS);
        end
      end
      last_start = cyc;
      n_starts++;
      busy <= 1;
      wait_cnt <= 2 + $urandom % 6;
      ans_pid <= pid_t'($urandom);
      ans_found <= ($urandom % 5) != 0;
    end else if (busy) begin
      if (wait_cnt == 0) begin
        gnt_done <= 1; gnt_pid <= ans_pid; gnt_found <= ans_found; busy <= 0;
      end else wait_cnt <= wait_cnt - 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic request();
    int n;
    @(negedge clk); sched_req = 1;
    n = 0;
    while (!sched_ack && n < 50) begin @(negedge clk); n++; end
    checks++;
    if (!sched_ack) begin failures++; $display("FAIL no ack"); end
    checks++;
    if (next_pid !== gnt_pid || next_valid !== gnt_found) begin
      failures++; $display("FAIL result %0d/%0d expected %0d/%0d", next_pid, next_valid, gnt_pid, gnt_found);
    end
    repeat ($urandom % 3) @(negedge clk);
    checks++;
    if (!sched_ack) begin failures++; $display("FAIL ack dropped early"); end
    sched_req = 0;
    @(negedge clk);
    checks++;
    if (sched_ack) begin failures++; $display("FAIL ack stayed up"); end
  endtask

  task automatic tick_and_check();
    int n, s0;
    s0 = n_starts;
    @(negedge clk); tick = 1; @(negedge clk); tick = 0;
    n = 0;
    while (!tick_irq && n < 50) begin @(negedge clk); n++; end
    checks++;
    if (!tick_irq) begin failures++; $display("FAIL no tick interrupt"); end
    checks++;
    if (next_pid !== gnt_pid || busy) begin failures++; $display("FAIL irq before result ready"); end
    repeat (5) @(negedge clk);
    checks++;
    if (!tick_irq) begin failures++; $display("FAIL irq not held"); end
    tick_irq_clr = 1; @(negedge clk); tick_irq_clr = 0;
    checks++;
    if (tick_irq) begin failures++; $display("FAIL irq not cleared"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 30; t++) begin
      request();
      repeat ($urandom % 20) @(negedge clk);
      tick_and_check();
      repeat ($urandom % 20) @(negedge clk);
    end
    // tick during a request: served after it
    for (int t = 0; t < 5; t++) begin
      int s0;
      @(negedge clk); sched_req = 1;
      @(negedge clk); @(negedge clk); tick = 1; @(negedge clk); tick = 0;
      s0 = n_starts;
      while (!sched_ack) @(negedge clk);
      checks++;
      if (tick_irq) begin failures++; $display("FAIL irq during request"); end
      sched_req = 0;
      repeat (15) @(negedge clk);
      checks++;
      if (!tick_irq || n_starts != s0 + 1) begin
        failures++; $display("FAIL pending tick not served (irq %0d starts %0d)", tick_irq, n_starts - s0);
      end else n_pending++;
      tick_irq_clr = 1; @(negedge clk); tick_irq_clr = 0;
    end
    checks++;
    if (n_pending == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
