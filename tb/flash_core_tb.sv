// flash_core_tb: exercises the scheduler core through its two four-phase
// interfaces with a small table (8 slots, 2 lanes, 300-cycle tick).
// Checks, against expectations worked out here:
//  * tasks of equal priority and equal run lengths are chosen round-robin,
//    first in slot order;
//  * every chosen task has the smallest vruntime among runnable tasks
//    (read from the store at acknowledge time);
//  * a request is acknowledged ceil(8/2)+3 cycles after it is raised;
//  * table full, duplicate and unknown-PID updates are rejected;
//  * blocked tasks are never chosen, and with none runnable next_valid is 0;
//  * a nice-0 task gets about 1024/110 times the picks of a nice+10 task;
//  * the timer tick raises the interrupt with a result every 300 cycles.
module flash_core_tb;
  import flash_pkg::*;
  localparam int N = 8, L = 2, T = 300;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic sched_req = 0, sched_ack, next_valid, tick_en = 0, tick_irq, tick_irq_clr = 0;
  pid_t next_pid;
  logic upd_req = 0, upd_ack, upd_err;
  upd_type_e upd_type = UPD_CREATE;
  upd_params_t upd_params = '0;

  flash_core #(.MAX_TASKS(N), .LANES(L), .TICK_CYCLES(T)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic update(upd_type_e k, pid_t p, int prio, task_state_e s, logic exp_err);
    @(negedge clk);
    upd_type = k; upd_params = '{pid: p, rsvd: 0, prio: prio_t'(prio), state: s};
    upd_req = 1;
    while (!upd_ack) @(negedge clk);
    checks++;
    if (upd_err !== exp_err) begin failures++; $display("FAIL %s pid %0d err %0d expected %0d", k.name(), p, upd_err, exp_err); end
    upd_req = 0;
    @(negedge clk);
  endtask

  // smallest vruntime among runnable records, read from the store
  function automatic logic min_ok(pid_t p);
    vrt_t m, mine;
    logic any, seen;
    any = 0; seen = 0; m = '1; mine = '1;
    for (int i = 0; i < N; i++) begin
      task_entry_t e;
      e = dut.u_data.mem[i];
      if (e.valid && e.state == ST_RUNNABLE) begin
        any = 1;
        if (e.vruntime < m) m = e.vruntime;
        if (e.pid == p) begin seen = 1; mine = e.vruntime; end
      end
    end
    return any && seen && mine == m;
  endfunction

  task automatic request(output pid_t p, output logic v, input int gap);
    int c0;
    repeat (gap) @(negedge clk);
    sched_req = 1; c0 = cyc;
    while (!sched_ack) @(negedge clk);
    checks++;
    if (cyc - c0 != (N + L - 1) / L + 3) begin failures++; $display("FAIL request latency %0d", cyc - c0); end
    p = next_pid; v = next_valid;
    if (v) begin
      checks++;
      if (!min_ok(p)) begin failures++; $display("FAIL pid %0d is not a runnable minimum", p); end
    end
    sched_req = 0;
    @(negedge clk);
  endtask

  initial begin
    pid_t p; logic v;
    int cnt_a, cnt_b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // nothing runnable yet
    request(p, v, 2);
    checks++; if (v) begin failures++; $display("FAIL task chosen from empty table"); end
    for (int i = 0; i < N; i++) update(UPD_CREATE, pid_t'(10 + i), 20, ST_RUNNABLE, 0);
    update(UPD_CREATE, 32'd99, 20, ST_RUNNABLE, 1);      // full
    update(UPD_CREATE, 32'd12, 20, ST_RUNNABLE, 1);      // duplicate
    update(UPD_EXIT, 32'd98, 20, ST_RUNNABLE, 1);        // unknown
    // round-robin among equals
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < N; i++) begin
        request(p, v, 50);
        checks++;
        if (!v || p != pid_t'(10 + i)) begin failures++; $display("FAIL round %0d: got %0d expected %0d", r, p, 10 + i); end
      end
    // blocked tasks are never chosen
    for (int i = 2; i < N; i++) update(UPD_SET_STATE, pid_t'(10 + i), 20, ST_BLOCKED, 0);
    for (int r = 0; r < 10; r++) begin
      request(p, v, 40);
      checks++;
      if (!v || (p != 10 && p != 11)) begin failures++; $display("FAIL blocked task %0d chosen", p); end
    end
    // weighting: pid 10 at nice 0, pid 11 at nice +10
    update(UPD_SET_PRIO, 32'd11, 30, ST_RUNNABLE, 0);
    cnt_a = 0; cnt_b = 0;
    for (int r = 0; r < 206; r++) begin
      request(p, v, 30);
      if (p == 10) cnt_a++; else if (p == 11) cnt_b++;
    end
    checks++;
    if (cnt_b == 0 || cnt_a < 7 * cnt_b || cnt_a > 12 * cnt_b) begin
      failures++; $display("FAIL weighting: nice0 %0d picks, nice10 %0d picks", cnt_a, cnt_b);
    end else $display("weighting: nice0 %0d picks, nice10 %0d picks", cnt_a, cnt_b);
    // idle
    update(UPD_SET_STATE, 32'd10, 20, ST_BLOCKED, 0);
    update(UPD_EXIT, 32'd11, 20, ST_BLOCKED, 0);
    request(p, v, 5);
    checks++; if (v) begin failures++; $display("FAIL idle expected"); end
    // wake-up: vruntime raised to the running minimum
    update(UPD_SET_STATE, 32'd13, 20, ST_RUNNABLE, 0);
    request(p, v, 5);
    checks++; if (!v || p != 13) begin failures++; $display("FAIL woken task not chosen (%0d)", p); end
    // timer tick
    tick_en = 1;
    for (int k = 0; k < 3; k++) begin
      int c0, n;
      c0 = cyc; n = 0;
      while (!tick_irq && n < 2 * T) begin @(negedge clk); n++; end
      checks++;
      if (!tick_irq || !next_valid || next_pid != 13) begin failures++; $display("FAIL tick %0d", k); end
      if (k > 0) begin
        checks++;
        if (n < T - 10 || n > T + 10) begin failures++; $display("FAIL tick period %0d", n); end
      end
      tick_irq_clr = 1; @(negedge clk); tick_irq_clr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
