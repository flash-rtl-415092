// process_data_tb: writes random records through the update port and random
// runtimes through the accounting port, and compares every slot with a
// reference copy kept here after each cycle. Also checks reset clearing and
// that the update port wins when both ports hit one slot.
module process_data_tb;
  import flash_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  int n_collide = 0;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, acc_en = 0;
  logic [2:0] wr_idx = 0, acc_idx = 0;
  task_entry_t wr_entry = '0;
  vrt_t acc_vruntime = '0;
  rt_t  acc_runtime = '0;
  task_entry_t entries [N];
  task_entry_t model [N];

  process_data #(.MAX_TASKS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic task_entry_t rnd_entry();
    task_entry_t e;
    e = {$urandom, $urandom, $urandom, $urandom, $urandom};
    return e;
  endfunction

  task automatic compare(string when);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (entries[i] !== model[i]) begin
        failures++;
        $display("FAIL %s slot %0d: got %h expected %h", when, i, entries[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    compare("after reset");
    for (int t = 0; t < 400; t++) begin
      wr_en        = ($urandom % 3) == 0;
      acc_en       = ($urandom % 2) == 0;
      wr_idx       = 3'($urandom);
      acc_idx      = (t % 10 == 0) ? wr_idx : 3'($urandom);
      wr_entry     = rnd_entry();
      acc_vruntime = {$urandom, $urandom};
      acc_runtime  = {$urandom, $urandom};
      if (wr_en && acc_en && wr_idx == acc_idx) n_collide++;
      @(posedge clk); #1;
      if (acc_en && !(wr_en && wr_idx == acc_idx)) begin
        model[acc_idx].vruntime = acc_vruntime;
        model[acc_idx].runtime  = acc_runtime;
      end
      if (wr_en) model[wr_idx] = wr_entry;
      compare($sformatf("cycle %0d", t));
    end
    wr_en = 0; acc_en = 0;
    checks++;
    if (n_collide == 0) begin failures++; $display("FAIL no port collision exercised"); end
    rst_n = 0;
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) model[i] = '0;
    compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
