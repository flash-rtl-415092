// get_next_task_tb: fills a process_data store with random records (with
// frequent vruntime ties, blocked and empty slots), runs selections with
// random runtimes, and compares against a reference computed here:
// the outgoing task is charged runtime and weighted vruntime (own copy of the
// CFS weights), then the runnable record with the smallest vruntime and the
// lowest index wins. Also checks found=0 with nothing runnable, min_vruntime
// and the latency of ceil(MAX_TASKS/LANES)+2 cycles. A table size that is not
// a multiple of LANES is used so the last group is partial.
module get_next_task_tb;
  import flash_pkg::*;
  localparam int N = 10, L = 4, NG = (N + L - 1) / L;
  int checks = 0, failures = 0;
  int n_charged = 0, n_idle = 0, n_tie = 0;

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done, found;
  rt_t  delta_ns = '0;
  pid_t pid;
  vrt_t min_vruntime;
  task_entry_t entries [N];
  logic acc_en, wr_en = 0;
  logic [3:0] acc_idx, wr_idx = 0;
  vrt_t acc_vruntime;
  rt_t  acc_runtime;
  task_entry_t wr_entry = '0;

  get_next_task #(.MAX_TASKS(N), .LANES(L)) dut (.clk, .rst_n, .start, .delta_ns,
    .busy, .done, .found, .pid, .min_vruntime, .entries,
    .acc_en, .acc_idx, .acc_vruntime, .acc_runtime);
  process_data #(.MAX_TASKS(N)) store (.clk, .rst_n, .wr_en, .wr_idx, .wr_entry,
    .acc_en, .acc_idx, .acc_vruntime, .acc_runtime, .entries);

  always #5 clk = ~clk;

  localparam int unsigned W [40] = '{
    88761, 71755, 56483, 46273, 36291, 29154, 23254, 18705, 14949, 11916,
    9548, 7620, 6100, 4904, 3906, 3121, 2501, 1991, 1586, 1277,
    1024, 820, 655, 526, 423, 335, 272, 215, 172, 137,
    110, 87, 70, 56, 45, 36, 29, 23, 18, 15};

  function automatic logic [47:0] ref_vr(logic [47:0] d, int p);
    logic [127:0] inv, prod;
    int q;
    q = (p > 39) ? 39 : p;
    inv  = (128'd1 << 32) / 128'(W[q]);
    prod = (128'(d) * inv) >> 22;
    return (prod > 128'hFFFF_FFFF_FFFF) ? 48'hFFFF_FFFF_FFFF : prod[47:0];
  endfunction

  task_entry_t model [N];
  logic cur_valid = 0;
  int   cur_idx = 0;
  pid_t cur_pid = 0;
  vrt_t model_min = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_rec(int i, task_entry_t e);
    wr_en = 1; wr_idx = 4'(i); wr_entry = e;
    @(posedge clk); #1;
    wr_en = 0;
    model[i] = e;
  endtask

  task automatic select_and_check(rt_t d);
    int lat, best;
    logic exp_found;
    // reference charge
    if (cur_valid && model[cur_idx].valid && model[cur_idx].pid == cur_pid) begin
      model[cur_idx].vruntime = model[cur_idx].vruntime + ref_vr(d, int'(model[cur_idx].prio));
      model[cur_idx].runtime  = model[cur_idx].runtime + d;
      n_charged++;
    end
    // reference choice
    best = -1;
    for (int i = 0; i < N; i++)
      if (model[i].valid && model[i].state == ST_RUNNABLE) begin
        if (best < 0 || model[i].vruntime < model[best].vruntime) best = i;
        else if (model[i].vruntime == model[best].vruntime) n_tie++;
      end
    exp_found = (best >= 0);
    if (!exp_found) n_idle++;
    delta_ns = d; start = 1;
    @(posedge clk); #1;
    start = 0; lat = 1;
    while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != NG + 2) begin failures++; $display("FAIL latency %0d expected %0d", lat, NG + 2); end
    checks++;
    if (found !== exp_found) begin failures++; $display("FAIL found %0d expected %0d", found, exp_found); end
    if (exp_found) begin
      checks++;
      if (pid !== model[best].pid) begin
        failures++; $display("FAIL pid %0d expected %0d (slot %0d)", pid, model[best].pid, best);
      end
      if (model[best].vruntime > model_min) model_min = model[best].vruntime;
      cur_pid = model[best].pid; cur_idx = best;
    end
    cur_valid = exp_found;
    checks++;
    if (min_vruntime !== model_min) begin failures++; $display("FAIL min_vruntime %0d expected %0d", min_vruntime, model_min); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (entries[i] !== model[i]) begin failures++; $display("FAIL slot %0d: %h expected %h", i, entries[i], model[i]); end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // nothing runnable
    select_and_check(48'd100);
    for (int t = 0; t < 300; t++) begin
      int nw;
      nw = (t == 0) ? N : int'($urandom % 3);
      for (int k = 0; k < nw; k++) begin
        task_entry_t e;
        e.valid    = ($urandom % 6) != 0;
        e.state    = task_state_e'(($urandom % 4) != 0);
        e.prio     = prio_t'($urandom % 40);
        e.pid      = pid_t'(1000 + $urandom % 5000);
        e.vruntime = vrt_t'(model_min + 48'($urandom % 4) * 48'd1000);
        e.runtime  = rt_t'($urandom);
        write_rec((t == 0) ? k : int'($urandom % N), e);
      end
      if (t % 50 == 49) for (int i = 0; i < N; i++) write_rec(i, '0);
      select_and_check(rt_t'($urandom % 3000000));
    end
    checks++;
    if (n_charged < 10 || n_idle < 2 || n_tie < 5) begin
      failures++; $display("FAIL coverage charged=%0d idle=%0d ties=%0d", n_charged, n_idle, n_tie);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
