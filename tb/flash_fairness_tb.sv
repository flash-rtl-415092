// flash_fairness_tb: the "ideal multi-tasking" workload. One, two and four
// tasks of equal priority share a simulated CPU; each should get 100 %, 50 %
// or 25 % of the time. The CPU model here runs the task FLASH last named
// until either the timer interrupt arrives (preemption) or the task gives up
// the CPU early at a random point (a scheduling request, as when it starts
// I/O), and adds the elapsed cycles to that task's account. Each task's share
// must be within 3 percentage points of the ideal. A second phase gives the
// four tasks nice levels -2, 0, 0, +3 and checks the shares against the CFS
// weights 1586 : 1024 : 1024 : 526 within 15 % of each share.
module flash_fairness_tb;
  import flash_pkg::*;
  localparam int N = 8, L = 4, T = 400, SLICES = 1500;
  int checks = 0, failures = 0;
  int n_preempt = 0, n_yield = 0;

  logic clk = 0, rst_n = 0;
  logic sched_req = 0, sched_ack, next_valid, tick_en = 0, tick_irq, tick_irq_clr = 0;
  pid_t next_pid;
  logic upd_req = 0, upd_ack, upd_err;
  upd_type_e upd_type = UPD_CREATE;
  upd_params_t upd_params = '0;

  flash_core #(.MAX_TASKS(N), .LANES(L), .TICK_CYCLES(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic update(upd_type_e k, pid_t p, int prio);
    @(negedge clk);
    upd_type = k; upd_params = '{pid: p, rsvd: 0, prio: prio_t'(prio), state: ST_RUNNABLE};
    upd_req = 1;
    while (!upd_ack) @(negedge clk);
    checks++;
    if (upd_err) begin failures++; $display("FAIL update rejected"); end
    upd_req = 0;
    @(negedge clk);
  endtask

  // Run SLICES slices over tasks with PIDs 1..n and return their cycle counts.
  task automatic run(int n, output longint acct [4]);
    pid_t cur;
    for (int i = 0; i < 4; i++) acct[i] = 0;
    // first pick
    @(negedge clk); sched_req = 1;
    while (!sched_ack) @(negedge clk);
    cur = next_pid; sched_req = 0;
    @(negedge clk);
    tick_en = 1;
    for (int s = 0; s < SLICES; s++) begin
      int budget, used;
      budget = ($urandom % 3 == 0) ? int'($urandom % T) : 2 * T;   // early yield or run to the tick
      used = 0;
      while (!tick_irq && used < budget) begin @(negedge clk); used++; end
      if (tick_irq) begin
        n_preempt++;
        tick_irq_clr = 1; @(negedge clk); tick_irq_clr = 0; used++;
      end else begin
        n_yield++;
        sched_req = 1;
        while (!sched_ack) begin @(negedge clk); used++; end
        sched_req = 0;
        @(negedge clk); used++;
      end
      if (cur >= 1 && cur <= 4) acct[cur - 1] += used;
      cur = next_pid;
      checks++;
      if (!next_valid || cur < 1 || cur > pid_t'(n)) begin failures++; $display("FAIL picked %0d", cur); end
    end
    tick_en = 0;
  endtask

  function automatic void check_shares(string what, int n, longint acct [4], real ideal [4], real tol, logic relative);
    longint total;
    total = 0;
    for (int i = 0; i < n; i++) total += acct[i];
    for (int i = 0; i < n; i++) begin
      real share, err;
      share = real'(acct[i]) / real'(total);
      err = share - ideal[i];
      if (err < 0) err = -err;
      checks++;
      if (relative ? (err > tol * ideal[i]) : (err > tol)) begin
        failures++; $display("FAIL %s task %0d share %f ideal %f", what, i + 1, share, ideal[i]);
      end else $display("%s task %0d share %f ideal %f", what, i + 1, share, ideal[i]);
    end
  endfunction

  initial begin
    longint acct [4];
    real ideal [4];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= 4; n = n * 2) begin
      for (int p = 1; p <= n; p++) if (p > n / 2 || n == 1) update(UPD_CREATE, pid_t'(p), 20);
      run(n, acct);
      for (int i = 0; i < 4; i++) ideal[i] = 1.0 / n;
      check_shares($sformatf("%0d tasks", n), n, acct, ideal, 0.03, 0);
    end
    update(UPD_SET_PRIO, 32'd1, 18);
    update(UPD_SET_PRIO, 32'd4, 23);
    run(4, acct);
    ideal[0] = 1586.0 / 4160.0; ideal[1] = 1024.0 / 4160.0;
    ideal[2] = 1024.0 / 4160.0; ideal[3] = 526.0 / 4160.0;
    check_shares("weighted", 4, acct, ideal, 0.15, 1);
    checks++;
    if (n_preempt == 0 || n_yield == 0) begin failures++; $display("FAIL preempt %0d yield %0d", n_preempt, n_yield); end
    $display("slices ended by the tick %0d, by a yield %0d", n_preempt, n_yield);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
