// process_modify_tb: drives update commands into process_modify connected to
// a process_data store and compares the store, the error flag and the
// start-to-done latency (done high 2 cycles after the start cycle) with a reference table kept here.
// Covers create (placement at min_vruntime), duplicate create, table full,
// exit, unknown PID, priority change and wake-up placement.
module process_modify_tb;
  import flash_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done, err;
  upd_cmd_t cmd = '0;
  vrt_t min_vruntime = '0;
  task_entry_t entries [N];
  logic wr_en, acc_en = 0;
  logic [2:0] wr_idx, acc_idx = 0;
  task_entry_t wr_entry;
  vrt_t acc_vruntime = '0;
  rt_t  acc_runtime = '0;
  task_entry_t model [N];
  int n_full = 0, n_unknown = 0, n_dup = 0, n_wake = 0;

  process_modify #(.MAX_TASKS(N)) dut (.clk, .rst_n, .start, .cmd, .busy, .done, .err,
    .min_vruntime, .entries, .wr_en, .wr_idx, .wr_entry);
  process_data #(.MAX_TASKS(N)) store (.clk, .rst_n, .wr_en, .wr_idx, .wr_entry,
    .acc_en, .acc_idx, .acc_vruntime, .acc_runtime, .entries);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find(pid_t p);
    for (int i = 0; i < N; i++) if (model[i].valid && model[i].pid == p) return i;
    return -1;
  endfunction
  function automatic int free_slot();
    for (int i = 0; i < N; i++) if (!model[i].valid) return i;
    return -1;
  endfunction

  task automatic apply(upd_type_e k, pid_t p, prio_t pr, task_state_e s);
    int lat, i;
    logic exp_err;
    i = find(p);
    exp_err = 0;
    case (k)
      UPD_CREATE: begin
        if (i >= 0) begin exp_err = 1; n_dup++; end
        else if (free_slot() < 0) begin exp_err = 1; n_full++; end
        else model[free_slot()] = '{valid: 1, state: s, prio: pr, pid: p,
                                    vruntime: min_vruntime, runtime: 0};
      end
      UPD_EXIT:     if (i < 0) begin exp_err = 1; n_unknown++; end else model[i] = '0;
      UPD_SET_PRIO: if (i < 0) begin exp_err = 1; n_unknown++; end else model[i].prio = pr;
      UPD_SET_STATE: if (i < 0) begin exp_err = 1; n_unknown++; end else begin
        if (model[i].state == ST_BLOCKED && s == ST_RUNNABLE && model[i].vruntime < min_vruntime) begin
          model[i].vruntime = min_vruntime; n_wake++;
        end
        model[i].state = s;
      end
    endcase
    cmd = '{kind: k, params: '{pid: p, rsvd: 0, prio: pr, state: s}};
    start = 1;
    lat = 1;
    @(posedge clk); #1;
    start = 0;
    do begin lat++; @(posedge clk); #1; end while (!done && lat < 20);
    checks++;
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (err !== exp_err) begin failures++; $display("FAIL err %0d expected %0d (kind %s pid %0d)", err, exp_err, k.name(), p); end
    for (int j = 0; j < N; j++) begin
      checks++;
      if (entries[j] !== model[j]) begin
        failures++;
        $display("FAIL slot %0d after %s pid %0d: got %h expected %h", j, k.name(), p, entries[j], model[j]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    min_vruntime = 48'd1000;
    for (int i = 0; i < N + 1; i++) apply(UPD_CREATE, pid_t'(100 + i), prio_t'(i), ST_RUNNABLE);
    apply(UPD_CREATE, 32'd103, 6'd5, ST_RUNNABLE);         // duplicate
    apply(UPD_EXIT, 32'd102, 6'd0, ST_RUNNABLE);
    apply(UPD_EXIT, 32'd102, 6'd0, ST_RUNNABLE);           // unknown now
    apply(UPD_SET_PRIO, 32'd104, 6'd33, ST_RUNNABLE);
    apply(UPD_SET_STATE, 32'd105, 6'd0, ST_BLOCKED);
    min_vruntime = 48'd5000;
    apply(UPD_SET_STATE, 32'd105, 6'd0, ST_RUNNABLE);      // wakes, raised to 5000
    apply(UPD_CREATE, 32'd777, 6'd20, ST_BLOCKED);         // takes freed slot 2
    for (int t = 0; t < 300; t++) begin
      min_vruntime = min_vruntime + 48'($urandom % 100);
      apply(upd_type_e'($urandom % 4), pid_t'(100 + $urandom % 12),
            prio_t'($urandom % 40), task_state_e'($urandom % 2));
    end
    checks++;
    if (n_full == 0 || n_unknown == 0 || n_dup == 0 || n_wake == 0) begin
      failures++; $display("FAIL coverage full=%0d unknown=%0d dup=%0d wake=%0d", n_full, n_unknown, n_dup, n_wake);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
