// sched_control: front end of the scheduling-control interface.
//
// It serves the two ways a task switch happens in Linux:
//  * Scheduling request: the kernel's schedule() raises sched_req (four-phase
//    handshake). A selection is started in get_next_task; when it ends,
//    next_pid/next_valid are loaded and sched_ack rises. The requester reads
//    the result and drops sched_req; sched_ack then drops.
//  * Timer tick: a pulse from timer_tick_gen starts a selection, and only
//    when its result is in next_pid is tick_irq raised, so software finds the
//    answer ready when it takes the interrupt. tick_irq stays high until
//    tick_irq_clr is pulsed.
// A tick that arrives while a selection is running is remembered and served
// next; a request has priority over a pending tick. Ticks arriving while one
// is pending merge into it.
//
// The block also times the running task: a counter of cycles since the last
// selection started, scaled by NS_PER_CYCLE (20 ns at the document's 50 MHz
// clock), is handed to get_next_task as the outgoing task's runtime.
//
// Timing: sched_ack rises in the cycle after gnt_done; it falls in the cycle
// after sched_req is seen low. The handshake itself follows the document; the
// interrupt clearing, the tick merging and the runtime timer are this design's
// choices.
module sched_control
  import flash_pkg::*;
#(
  parameter int unsigned NS_PER_CYCLE = 20
) (
  input  logic clk,
  input  logic rst_n,
  // scheduling-request handshake
  input  logic sched_req,
  output logic sched_ack,
  output pid_t next_pid,
  output logic next_valid,
  // timer tick
  input  logic tick,
  output logic tick_irq,
  input  logic tick_irq_clr,
  // get_next_task
  output logic gnt_start,
  output rt_t  gnt_delta_ns,
  input  logic gnt_done,
  input  logic gnt_found,
  input  pid_t gnt_pid
);

  typedef enum logic [1:0] {S_IDLE, S_REQ_WAIT, S_REQ_ACK, S_TICK_WAIT} state_e;

  state_e state_q;
  logic   tick_pend_q;
  rt_t    run_cycles_q;

  always_comb begin
    gnt_start = (state_q == S_IDLE) && (sched_req || tick_pend_q || tick);
    gnt_delta_ns = rt_t'(run_cycles_q * RT_W'(NS_PER_CYCLE));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      tick_pend_q  <= 1'b0;
      run_cycles_q <= '0;
      sched_ack    <= 1'b0;
      next_pid     <= '0;
      next_valid   <= 1'b0;
      tick_irq     <= 1'b0;
    end else begin
      // runtime of the current task in cycles, restarted at every selection
      // (the cycle of the start itself is the first cycle of the new task)
      if (gnt_start)             run_cycles_q <= rt_t'(1);
      else if (~&run_cycles_q)   run_cycles_q <= run_cycles_q + 1'b1;

      if (tick) tick_pend_q <= 1'b1;
      if (tick_irq_clr) tick_irq <= 1'b0;

      unique case (state_q)
        S_IDLE: begin
          if (sched_req) begin
            state_q <= S_REQ_WAIT;
          end else if (tick_pend_q || tick) begin
            tick_pend_q <= 1'b0;
            state_q     <= S_TICK_WAIT;
          end
        end
        S_REQ_WAIT: if (gnt_done) begin
          next_pid   <= gnt_pid;
          next_valid <= gnt_found;
          sched_ack  <= 1'b1;
          state_q    <= S_REQ_ACK;
        end
        S_REQ_ACK: if (!sched_req) begin
          sched_ack <= 1'b0;
          state_q   <= S_IDLE;
        end
        S_TICK_WAIT: if (gnt_done) begin
          next_pid   <= gnt_pid;
          next_valid <= gnt_found;
          tick_irq   <= 1'b1;
          state_q    <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Four-phase rules: the acknowledge only rises while the request is up, and
  // the requester keeps the request up until it has been acknowledged.
  a_ack_needs_req : assert property (@(posedge clk) disable iff (!rst_n)
    $rose(sched_ack) |-> $past(sched_req));
  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    $fell(sched_req) |-> sched_ack);

endmodule
