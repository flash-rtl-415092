// flash_top_tb: end-to-end test of the memory-mapped scheduler at its default
// size (64 task slots, 4 lanes, 50,000-cycle tick), acting as the host
// driver: every operation is a register write followed by polling STATUS.
//
// Scenario and checks (expected values worked out here):
//  * idle: a request on an empty table returns "no task";
//  * 64 creates fill the table; a 65th is rejected (table full); a
//    duplicate PID and the exit of an unknown PID are rejected;
//  * the first 64 requests visit every task once in slot order, and every
//    pick has the smallest vruntime of the runnable tasks (read from the
//    store);
//  * after blocking all but three tasks at nice -5, 0 and +5, the number of
//    picks follows the CFS weights 3121 : 1024 : 335 within 25 %;
//  * a task that slept long wakes with its vruntime raised to min_vruntime
//    and is then picked;
//  * writes to the update registers while an update is busy are ignored;
//  * the timer tick interrupt comes every 50,000 cycles with a result, and a
//    tick that falls during a request is served after it.
// Each mechanism is counted and must occur at least once.
module flash_top_tb;
  import flash_pkg::*;
  localparam int N = 64, TICK = 50000;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [2:0]  avs_address = 0;
  logic        avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic        irq;

  flash_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz
  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_idle = 0, n_full = 0, n_dup = 0, n_unknown = 0, n_charge = 0;
  int n_wake = 0, n_tick = 0, n_tick_pending = 0, n_tie = 0, n_blocked_skip = 0;

  always @(posedge clk) if (dut.u_core.u_gnt.acc_en) n_charge++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [2:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic rd(logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    d = avs_readdata;
  endtask

  task automatic update(int kind, int pid, int prio, int state, logic exp_err);
    logic [31:0] st;
    wr(0, pid);
    wr(1, (state << 16) | (prio << 8) | kind);
    do rd(3, st); while (st[0]);
    checks++;
    if (st[1] !== exp_err) begin failures++; $display("FAIL update %0d pid %0d err %0d expected %0d", kind, pid, st[1], exp_err); end
  endtask

  function automatic logic is_min(int p);
    vrt_t m, mine;
    logic seen;
    int nmin;
    m = '1; seen = 0; mine = '1; nmin = 0;
    for (int i = 0; i < N; i++) begin
      task_entry_t e;
      e = dut.u_core.u_data.mem[i];
      if (e.valid && e.state == ST_RUNNABLE) begin
        if (e.vruntime < m) m = e.vruntime;
        if (e.pid == pid_t'(p)) begin seen = 1; mine = e.vruntime; end
      end
    end
    for (int i = 0; i < N; i++)
      if (dut.u_core.u_data.mem[i].valid && dut.u_core.u_data.mem[i].state == ST_RUNNABLE
          && dut.u_core.u_data.mem[i].vruntime == m) nmin++;
    if (nmin > 1) n_tie++;
    return seen && mine == m;
  endfunction

  task automatic request(output int pid, output logic valid);
    logic [31:0] st, d;
    wr(2, 1);
    do rd(3, st); while (st[2]);
    rd(4, d);
    pid = int'(d); valid = st[3];
    if (valid) begin
      checks++;
      if (!is_min(pid)) begin failures++; $display("FAIL pid %0d is not the runnable minimum", pid); end
    end else n_idle++;
  endtask

  initial begin
    int p, ca, cb, cc;
    logic v;
    logic [31:0] st;
    repeat (5) @(negedge clk);
    rst_n = 1;
    request(p, v);
    checks++; if (v) begin failures++; $display("FAIL task from empty table"); end
    for (int i = 0; i < N; i++) update(0, 1000 + i, 20, 1, 0);
    update(0, 5000, 20, 1, 1); n_full++;
    update(0, 1003, 20, 1, 1); n_dup++;
    update(1, 4444, 20, 1, 1); n_unknown++;
    for (int i = 0; i < N; i++) begin
      repeat (100) @(negedge clk);
      request(p, v);
      checks++;
      if (!v || p != 1000 + i) begin failures++; $display("FAIL first pass: got %0d expected %0d", p, 1000 + i); end
    end
    // three tasks of different priority remain runnable
    for (int i = 3; i < N; i++) begin update(3, 1000 + i, 20, 0, 0); n_blocked_skip++; end
    update(2, 1000, 15, 1, 0);
    update(2, 1001, 20, 1, 0);
    update(2, 1002, 25, 1, 0);
    ca = 0; cb = 0; cc = 0;
    for (int r = 0; r < 800; r++) begin
      repeat (200) @(negedge clk);
      request(p, v);
      checks++;
      if (!v || p < 1000 || p > 1002) begin failures++; $display("FAIL blocked task %0d chosen", p); end
      if (p == 1000) ca++; else if (p == 1001) cb++; else if (p == 1002) cc++;
    end
    $display("picks nice-5 %0d, nice0 %0d, nice+5 %0d", ca, cb, cc);
    checks++;
    if (cc == 0 || real'(ca) / real'(cb) < 0.75 * 3121.0 / 1024.0 || real'(ca) / real'(cb) > 1.25 * 3121.0 / 1024.0
        || real'(cb) / real'(cc) < 0.75 * 1024.0 / 335.0 || real'(cb) / real'(cc) > 1.25 * 1024.0 / 335.0) begin
      failures++; $display("FAIL picks do not follow the weights");
    end
    // wake a long sleeper: placed at min_vruntime, then picked before the others move on
    update(3, 1040, 20, 1, 0);
    begin
      vrt_t vr, mv;
      vr = '0;
      for (int i = 0; i < N; i++) if (dut.u_core.u_data.mem[i].pid == 1040) vr = dut.u_core.u_data.mem[i].vruntime;
      mv = dut.u_core.u_gnt.min_vruntime;
      checks++;
      if (vr != mv || mv == 0) begin failures++; $display("FAIL wake placement %0d vs %0d", vr, mv); end
      else n_wake++;
    end
    // register readback, and a second command while busy is ignored
    begin
      logic [31:0] d;
      int n_before, n_after;
      n_before = 0; n_after = 0;
      for (int i = 0; i < N; i++) if (dut.u_core.u_data.mem[i].valid) n_before++;
      wr(0, 1003);
      @(negedge clk); avs_address = 1; avs_writedata = 32'h0001_1402; avs_write = 1;
      @(negedge clk); avs_address = 0; avs_writedata = 7001;
      @(negedge clk); avs_address = 1; avs_writedata = 32'h0001_1402;
      @(negedge clk); avs_write = 0;
      do rd(3, st); while (st[0]);
      rd(0, d);
      checks++; if (d != 1003) begin failures++; $display("FAIL UPD_PID changed while busy: %0d", d); end
      rd(1, d);
      checks++; if (d != 32'h0001_1402) begin failures++; $display("FAIL UPD_CMD readback %h", d); end
      for (int i = 0; i < N; i++) if (dut.u_core.u_data.mem[i].valid) n_after++;
      checks++;
      if (st[1] || n_after != n_before) begin failures++; $display("FAIL busy write: err %0d, %0d -> %0d tasks", st[1], n_before, n_after); end
    end
    // timer tick
    wr(5, 1);
    begin
      int last;
      last = -1;
      for (int k = 0; k < 3; k++) begin
        int n;
        n = 0;
        while (!irq && n < 2 * TICK) begin @(negedge clk); n++; end
        checks++;
        if (!irq) begin failures++; $display("FAIL no tick"); end
        rd(3, st);
        checks++;
        if (!st[3] || !st[4]) begin failures++; $display("FAIL tick without result"); end
        if (last >= 0) begin
          checks++;
          if (cyc - last < TICK - 20 || cyc - last > TICK + 20) begin failures++; $display("FAIL tick period %0d", cyc - last); end
        end
        last = cyc;
        n_tick++;
        wr(5, 3);   // keep enabled, clear
      end
    end
    // a tick that lands during a request is served after it
    begin
      int n;
      n = 0;
      while (dut.u_core.u_tick.cnt_q != 16'(TICK - 3)) @(negedge clk);
      avs_address = 2; avs_writedata = 1; avs_write = 1;
      @(negedge clk); avs_write = 0;
      do rd(3, st); while (st[2]);
      while (!irq && n < 100) begin @(negedge clk); n++; end
      checks++;
      if (!irq) begin failures++; $display("FAIL pending tick lost"); end
      else n_tick_pending++;
      wr(5, 2);
    end
    checks++;
    if (n_idle == 0 || n_full == 0 || n_dup == 0 || n_unknown == 0 || n_charge == 0 || n_wake == 0
        || n_tick == 0 || n_tick_pending == 0 || n_tie == 0 || n_blocked_skip == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: idle %0d, table full %0d, duplicate %0d, unknown pid %0d, charges %0d, wake %0d, ticks %0d, pending tick %0d, ties %0d, blocked %0d",
             n_idle, n_full, n_dup, n_unknown, n_charge, n_wake, n_tick, n_tick_pending, n_tie, n_blocked_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
