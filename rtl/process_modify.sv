// process_modify: back-end writer between the process-control front end and
// the process data store.
//
// It applies one update command {type, PID, priority, state}:
//   CREATE    - takes the lowest free slot; the new task starts with runtime 0
//               and vruntime = min_vruntime (the vruntime of the task most
//               recently chosen), so it neither starves others nor is starved,
//               as CFS places new tasks. Fails if the PID exists or the table
//               is full.
//   EXIT      - clears the slot of the PID.
//   SET_PRIO  - rewrites the priority of the PID.
//   SET_STATE - rewrites the state of the PID. A task that wakes up
//               (blocked -> runnable) has its vruntime raised to at least
//               min_vruntime, the CFS rule that keeps a long sleeper from
//               monopolising the CPU afterwards.
// Updates that name an unknown PID fail and leave the store unchanged.
// The PID is matched against all slots in parallel.
//
// Timing: start is sampled in IDLE; the match and the write take place in the
// next cycle; done (with err) pulses for one cycle after that, when the store
// already holds the new record. start is ignored while busy.
// The command set, the error flag and the wake-up rule are this design's
// choices; the document gives only the (PID, priority, state) triple.
module process_modify
  import flash_pkg::*;
#(
  parameter int unsigned MAX_TASKS = 64,
  localparam int unsigned IDX_W = (MAX_TASKS > 1) ? $clog2(MAX_TASKS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  upd_cmd_t          cmd,
  output logic              busy,
  output logic              done,
  output logic              err,
  input  vrt_t              min_vruntime,
  input  task_entry_t       entries [MAX_TASKS],
  output logic              wr_en,
  output logic [IDX_W-1:0]  wr_idx,
  output task_entry_t       wr_entry
);

  typedef enum logic {S_IDLE, S_EXEC} state_e;
  state_e   state_q;
  upd_cmd_t cmd_q;

  logic             hit, free;
  logic [IDX_W-1:0] hit_idx, free_idx;
  logic             fail;

  // Parallel PID match and free-slot search (lowest index wins).
  always_comb begin
    hit = 1'b0; free = 1'b0; hit_idx = '0; free_idx = '0;
    for (int i = MAX_TASKS - 1; i >= 0; i--) begin
      if (entries[i].valid && entries[i].pid == cmd_q.params.pid) begin
        hit = 1'b1; hit_idx = IDX_W'(i);
      end
      if (!entries[i].valid) begin
        free = 1'b1; free_idx = IDX_W'(i);
      end
    end
  end

  always_comb begin
    task_entry_t cur;
    cur      = entries[hit_idx];
    wr_en    = 1'b0;
    wr_idx   = hit_idx;
    wr_entry = cur;
    fail     = 1'b0;
    if (state_q == S_EXEC) begin
      unique case (cmd_q.kind)
        UPD_CREATE: begin
          fail     = hit || !free;
          wr_idx   = free_idx;
          wr_entry = '{valid: 1'b1, state: cmd_q.params.state,
                       prio: cmd_q.params.prio, pid: cmd_q.params.pid,
                       vruntime: min_vruntime, runtime: '0};
        end
        UPD_EXIT: begin
          fail     = !hit;
          wr_entry = '0;
        end
        UPD_SET_PRIO: begin
          fail          = !hit;
          wr_entry.prio = cmd_q.params.prio;
        end
        UPD_SET_STATE: begin
          fail           = !hit;
          wr_entry.state = cmd_q.params.state;
          if (cur.state == ST_BLOCKED && cmd_q.params.state == ST_RUNNABLE
              && cur.vruntime < min_vruntime)
            wr_entry.vruntime = min_vruntime;
        end
        default: fail = 1'b1;
      endcase
      wr_en = !fail;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cmd_q   <= '0;
      done    <= 1'b0;
      err     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          cmd_q   <= cmd;
          state_q <= S_EXEC;
        end
        S_EXEC: begin
          done    <= 1'b1;
          err     <= fail;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

endmodule
