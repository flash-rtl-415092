// process_data: the backing store of task records ("Process Data").
//
// An unordered table of MAX_TASKS records {valid, state, priority, PID,
// vruntime, runtime}. FLASH deliberately keeps no ordering (no red-black
// tree): the selection logic scans it. All records are readable at once so
// that several can be compared per cycle and PIDs can be matched in parallel.
//
// Two write ports:
//   * update port (wr_*), owned by process_modify: writes a whole record.
//   * accounting port (acc_*), owned by get_next_task: writes only the
//     vruntime and runtime of one record.
// Both write on the rising clock edge; reads are combinational from the
// registers. If both ports address the same slot in one cycle the update
// port wins, so a task that exits while being charged stays removed.
// Reset (synchronous, active low) clears every valid bit; other fields are
// also cleared so that nothing read is uninitialised.
module process_data
  import flash_pkg::*;
#(
  parameter int unsigned MAX_TASKS = 64,
  localparam int unsigned IDX_W = (MAX_TASKS > 1) ? $clog2(MAX_TASKS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // update port
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_idx,
  input  task_entry_t       wr_entry,
  // accounting port
  input  logic              acc_en,
  input  logic [IDX_W-1:0]  acc_idx,
  input  vrt_t              acc_vruntime,
  input  rt_t               acc_runtime,
  // parallel read
  output task_entry_t       entries [MAX_TASKS]
);

  task_entry_t mem [MAX_TASKS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_TASKS; i++) mem[i] <= '0;
    end else begin
      if (acc_en && !(wr_en && wr_idx == acc_idx)) begin
        mem[acc_idx].vruntime <= acc_vruntime;
        mem[acc_idx].runtime  <= acc_runtime;
      end
      if (wr_en) mem[wr_idx] <= wr_entry;
    end
  end

  assign entries = mem;

endmodule
