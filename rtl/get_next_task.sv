// get_next_task: back-end reader that chooses the next task to run.
//
// A selection has two parts.
//  1. Charge: the task chosen last time (the one now leaving the CPU) is
//     charged for the time it ran: runtime += delta_ns and
//     vruntime += delta_ns * 1024 / weight(prio) (see vruntime_calc). It is
//     charged only if its slot still holds the same PID; a task that exited
//     meanwhile is skipped.
//  2. Scan: the unordered table is read LANES records per cycle. Each group
//     goes through a log2(LANES)-deep comparator tree that keeps the runnable
//     record with the smallest vruntime, and the group winner is compared with
//     the best so far. Ties go to the lower slot index.
// The winner's PID is returned and it becomes the current task; min_vruntime
// is raised to its vruntime (it never decreases) and is used to place new and
// waking tasks. If no task is runnable, found is 0 and no task is current.
//
// Timing: start is sampled when idle; one charge cycle and
// ceil(MAX_TASKS/LANES) scan cycles follow, and done pulses for one cycle
// with found/pid in the cycle after the last scan cycle, i.e. done is high
// ceil(MAX_TASKS/LANES)+2 cycles after the cycle in which start was high.
// pid/found hold until the next done. The document specifies the unordered
// array, minimum-vruntime choice and parallel comparison; the lane count, the
// tie rule and the cycle schedule are this design's choices.
module get_next_task
  import flash_pkg::*;
#(
  parameter int unsigned MAX_TASKS = 64,
  parameter int unsigned LANES     = 4,
  localparam int unsigned IDX_W = (MAX_TASKS > 1) ? $clog2(MAX_TASKS) : 1,
  localparam int unsigned NGROUPS = (MAX_TASKS + LANES - 1) / LANES,
  localparam int unsigned GRP_W = (NGROUPS > 1) ? $clog2(NGROUPS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  rt_t               delta_ns,
  output logic              busy,
  output logic              done,
  output logic              found,
  output pid_t              pid,
  output vrt_t              min_vruntime,
  // store access
  input  task_entry_t       entries [MAX_TASKS],
  output logic              acc_en,
  output logic [IDX_W-1:0]  acc_idx,
  output vrt_t              acc_vruntime,
  output rt_t               acc_runtime
);

  typedef enum logic [1:0] {S_IDLE, S_CHARGE, S_SCAN} state_e;

  typedef struct packed {
    logic             ok;
    vrt_t             vr;
    logic [IDX_W-1:0] idx;
  } cand_t;

  state_e           state_q;
  rt_t              delta_q;
  logic [GRP_W-1:0] grp_q;
  cand_t            best_q;
  logic             cur_valid_q;
  logic [IDX_W-1:0] cur_idx_q;
  pid_t             cur_pid_q;

  // ---- charge of the outgoing task ------------------------------------
  task_entry_t cur_e;
  vrt_t        dvr;

  assign cur_e = entries[cur_idx_q];

  vruntime_calc u_weight (
    .delta_ns (delta_q),
    .prio     (cur_e.prio),
    .delta_vr (dvr)
  );

  assign acc_en       = (state_q == S_CHARGE) && cur_valid_q && cur_e.valid
                        && (cur_e.pid == cur_pid_q);
  assign acc_idx      = cur_idx_q;
  assign acc_vruntime = cur_e.vruntime + dvr;
  assign acc_runtime  = cur_e.runtime + delta_q;

  // ---- comparator tree over one group ---------------------------------
  function automatic cand_t better(cand_t a, cand_t b);
    if (!b.ok) return a;
    if (!a.ok) return b;
    return (b.vr < a.vr) ? b : a;   // a holds the lower index on a tie
  endfunction

  cand_t node [LANES];
  cand_t grp_best, next_best;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      int unsigned i;
      i = int'(grp_q) * LANES + l;
      node[l] = '0;
      if (i < MAX_TASKS) begin
        node[l].ok  = entries[i].valid && (entries[i].state == ST_RUNNABLE);
        node[l].vr  = entries[i].vruntime;
        node[l].idx = IDX_W'(i);
      end
    end
    for (int step = 1; step < LANES; step = step * 2)
      for (int l = 0; l + step < LANES; l = l + 2 * step)
        node[l] = better(node[l], node[l + step]);
    grp_best  = node[0];
    next_best = better(best_q, grp_best);
  end

  // ---- control ---------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      delta_q      <= '0;
      grp_q        <= '0;
      best_q       <= '0;
      cur_valid_q  <= 1'b0;
      cur_idx_q    <= '0;
      cur_pid_q    <= '0;
      done         <= 1'b0;
      found        <= 1'b0;
      pid          <= '0;
      min_vruntime <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          delta_q <= delta_ns;
          state_q <= S_CHARGE;
        end
        S_CHARGE: begin
          grp_q   <= '0;
          best_q  <= '0;
          state_q <= S_SCAN;
        end
        S_SCAN: begin
          best_q <= next_best;
          if (int'(grp_q) == NGROUPS - 1) begin
            state_q     <= S_IDLE;
            done        <= 1'b1;
            found       <= next_best.ok;
            cur_valid_q <= next_best.ok;
            cur_idx_q   <= next_best.idx;
            if (next_best.ok) begin
              pid       <= entries[next_best.idx].pid;
              cur_pid_q <= entries[next_best.idx].pid;
              if (next_best.vr > min_vruntime) min_vruntime <= next_best.vr;
            end
          end else begin
            grp_q <= grp_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

endmodule
