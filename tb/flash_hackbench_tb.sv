// flash_hackbench_tb: a message-passing stress load in the style of the
// hackbench scheduler benchmark, on the core at its default size (64 slots,
// 4 lanes), driven through the two four-phase interfaces.
//
// hackbench starts far more tasks than the table holds, so the test first
// tries to create 400 tasks: 64 must be accepted and 336 rejected. Then the
// 64 tasks pass messages: the task FLASH picks runs for a random time,
// wakes a random blocked task (a message arrives for it), may block itself
// (it waits to receive), and yields with a scheduling request. A reference
// copy of every task's state is kept here. Checks: every pick is runnable
// in the reference and has the smallest vruntime in the table, blocked tasks
// are never picked, and every task is picked at least once (no starvation).
module flash_hackbench_tb;
  import flash_pkg::*;
  localparam int N = 64, TRIES = 400, ROUNDS = 3000;
  int checks = 0, failures = 0;
  int n_rejected = 0, n_block = 0, n_wake = 0;

  logic clk = 0, rst_n = 0;
  logic sched_req = 0, sched_ack, next_valid, tick_en = 0, tick_irq, tick_irq_clr = 0;
  pid_t next_pid;
  logic upd_req = 0, upd_ack, upd_err;
  upd_type_e upd_type = UPD_CREATE;
  upd_params_t upd_params = '0;

  flash_core dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic runnable [N];
  int   picks [N];

  task automatic update(upd_type_e k, int p, task_state_e s, output logic e);
    @(negedge clk);
    upd_type = k; upd_params = '{pid: pid_t'(p), rsvd: 0, prio: 6'd20, state: s};
    upd_req = 1;
    while (!upd_ack) @(negedge clk);
    e = upd_err;
    upd_req = 0;
    @(negedge clk);
  endtask

  function automatic logic is_min(pid_t p);
    vrt_t m, mine;
    logic seen;
    m = '1; mine = '1; seen = 0;
    for (int i = 0; i < N; i++) begin
      task_entry_t e;
      e = dut.u_data.mem[i];
      if (e.valid && e.state == ST_RUNNABLE) begin
        if (e.vruntime < m) m = e.vruntime;
        if (e.pid == p) begin seen = 1; mine = e.vruntime; end
      end
    end
    return seen && mine == m;
  endfunction

  initial begin
    logic e;
    int cur;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < TRIES; p++) begin
      update(UPD_CREATE, 1000 + p, ST_RUNNABLE, e);
      checks++;
      if (e !== (p >= N)) begin failures++; $display("FAIL create %0d err %0d", p, e); end
      if (e) n_rejected++;
    end
    checks++;
    if (n_rejected != TRIES - N) begin failures++; $display("FAIL %0d rejected", n_rejected); end
    for (int i = 0; i < N; i++) begin runnable[i] = 1; picks[i] = 0; end
    for (int r = 0; r < ROUNDS; r++) begin
      // pick
      @(negedge clk); sched_req = 1;
      while (!sched_ack) @(negedge clk);
      cur = int'(next_pid) - 1000;
      checks++;
      if (!next_valid || cur < 0 || cur >= N || !runnable[cur] || !is_min(next_pid)) begin
        failures++; $display("FAIL round %0d picked %0d (valid %0d)", r, next_pid, next_valid);
      end else picks[cur]++;
      sched_req = 0;
      @(negedge clk);
      // run
      repeat ($urandom % 200) @(negedge clk);
      // send a message: wake one blocked task
      begin
        int t;
        t = int'($urandom % N);
        if (!runnable[t]) begin
          update(UPD_SET_STATE, 1000 + t, ST_RUNNABLE, e);
          runnable[t] = 1; n_wake++;
        end
      end
      // wait to receive: block, unless it is the last runnable task
      if ($urandom % 2 == 0 && cur >= 0 && cur < N) begin
        int nr;
        nr = 0;
        for (int i = 0; i < N; i++) nr += int'(runnable[i]);
        if (nr > 1) begin
          update(UPD_SET_STATE, 1000 + cur, ST_BLOCKED, e);
          runnable[cur] = 0; n_block++;
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (picks[i] == 0) begin failures++; $display("FAIL task %0d never ran", 1000 + i); end
    end
    checks++;
    if (n_block == 0 || n_wake == 0) failures++;
    $display("rejected creates %0d, blocks %0d, wake-ups %0d", n_rejected, n_block, n_wake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
