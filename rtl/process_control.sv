// process_control: front end of the process-control interface.
//
// The kernel reports every change of a task's existence, priority or state,
// so that the scheduler's table stays consistent with the kernel's own. An
// update is an "update type" plus the (PID, priority, state) triple, passed
// with a four-phase handshake: the sender sets upd_type/upd_params and raises
// upd_req; the block latches them and hands the command to process_modify;
// when that finishes, upd_err is loaded and upd_ack rises; the sender drops
// upd_req, and upd_ack drops in the next cycle.
//
// Timing: one cycle to latch, the process_modify latency (start to done),
// then upd_ack in the cycle after pm_done. upd_err is valid while upd_ack is
// high. The handshake and the triple follow the document; the type encoding
// and the error flag are this design's choices.
module process_control
  import flash_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host side
  input  logic        upd_req,
  input  upd_type_e   upd_type,
  input  upd_params_t upd_params,
  output logic        upd_ack,
  output logic        upd_err,
  // process_modify side
  output logic        pm_start,
  output upd_cmd_t    pm_cmd,
  input  logic        pm_done,
  input  logic        pm_err
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_ACK} state_e;
  state_e state_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pm_cmd  <= '0;
      upd_ack <= 1'b0;
      upd_err <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (upd_req) begin
          pm_cmd  <= '{kind: upd_type, params: upd_params};
          state_q <= S_ISSUE;
        end
        S_ISSUE: state_q <= S_WAIT;
        S_WAIT: if (pm_done) begin
          upd_err <= pm_err;
          upd_ack <= 1'b1;
          state_q <= S_ACK;
        end
        S_ACK: if (!upd_req) begin
          upd_ack <= 1'b0;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign pm_start = (state_q == S_ISSUE);

  a_ack_needs_req : assert property (@(posedge clk) disable iff (!rst_n)
    $rose(upd_ack) |-> $past(upd_req));
  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    $fell(upd_req) |-> upd_ack);

endmodule
