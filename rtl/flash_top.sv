// flash_top: FLASH as a memory-mapped peripheral of a host CPU.
//
// The scheduler core sits behind a small Avalon-MM slave register file (the
// "wrapper") so that a device driver can use it with plain 32-bit register
// reads and writes, and a single interrupt line carries the timer tick. The
// wrapper runs the core's two four-phase handshakes on the CPU's behalf; the
// driver starts an operation with one write and polls a busy bit.
//
// Register map (word addresses, 32-bit data):
//   0 UPD_PID   R/W  PID for the next process update
//   1 UPD_CMD   R/W  [1:0] update type (0 create, 1 exit, 2 set priority,
//                    3 set state), [13:8] priority (nice + 20),
//                    [16] state (1 runnable, 0 blocked).
//                    A write starts the update unless one is in progress.
//   2 SCHED     W    any write starts a scheduling request
//   3 STATUS    R    [0] update busy, [1] last update failed,
//                    [2] request busy, [3] NEXT_PID holds a task,
//                    [4] tick interrupt pending, [5] tick enabled
//   4 NEXT_PID  R    PID chosen by the last request or tick
//   5 TICK      R/W  W: [0] tick enable, [1] write 1 to clear the interrupt
//                    R: [0] tick enable, [1] interrupt pending
// Reads return data one cycle after avs_read (fixed read latency 1, no
// waitrequest). irq equals the core's tick interrupt.
//
// The register map, the read latency and the polling model are this design's
// choices; the document names the wrapper and the bus but does not define
// them.
module flash_top
  import flash_pkg::*;
#(
  parameter int unsigned MAX_TASKS    = 64,
  parameter int unsigned LANES        = 4,
  parameter int unsigned TICK_CYCLES  = 50000,
  parameter int unsigned NS_PER_CYCLE = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        irq
);

  localparam logic [2:0] A_UPD_PID  = 3'd0;
  localparam logic [2:0] A_UPD_CMD  = 3'd1;
  localparam logic [2:0] A_SCHED    = 3'd2;
  localparam logic [2:0] A_STATUS   = 3'd3;
  localparam logic [2:0] A_NEXT_PID = 3'd4;
  localparam logic [2:0] A_TICK     = 3'd5;

  pid_t        upd_pid_q;
  logic [31:0] upd_cmd_q;
  logic        upd_req_q, upd_err_q;
  logic        sched_req_q;
  logic        tick_en_q, irq_clr;

  logic        sched_ack, next_valid, tick_irq, upd_ack, upd_err;
  pid_t        next_pid;
  upd_params_t params;

  logic        upd_busy, sched_busy;
  assign upd_busy   = upd_req_q || upd_ack;
  assign sched_busy = sched_req_q || sched_ack;

  assign params = '{pid: upd_pid_q, rsvd: 1'b0, prio: upd_cmd_q[13:8],
                    state: task_state_e'(upd_cmd_q[16])};
  assign irq_clr = avs_write && (avs_address == A_TICK) && avs_writedata[1];

  flash_core #(
    .MAX_TASKS(MAX_TASKS), .LANES(LANES),
    .TICK_CYCLES(TICK_CYCLES), .NS_PER_CYCLE(NS_PER_CYCLE)
  ) u_core (
    .clk, .rst_n,
    .sched_req(sched_req_q), .sched_ack, .next_pid, .next_valid,
    .tick_en(tick_en_q), .tick_irq, .tick_irq_clr(irq_clr),
    .upd_req(upd_req_q), .upd_type(upd_type_e'(upd_cmd_q[1:0])),
    .upd_params(params), .upd_ack, .upd_err
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upd_pid_q    <= '0;
      upd_cmd_q    <= '0;
      upd_req_q    <= 1'b0;
      upd_err_q    <= 1'b0;
      sched_req_q  <= 1'b0;
      tick_en_q    <= 1'b0;
      avs_readdata <= '0;
    end else begin
      // handshakes run by the wrapper: drop the request once acknowledged
      if (upd_req_q && upd_ack) begin
        upd_req_q <= 1'b0;
        upd_err_q <= upd_err;
      end
      if (sched_req_q && sched_ack) sched_req_q <= 1'b0;

      if (avs_write) begin
        unique case (avs_address)
          A_UPD_PID: if (!upd_busy) upd_pid_q <= avs_writedata;
          A_UPD_CMD: if (!upd_busy) begin
            upd_cmd_q <= avs_writedata;
            upd_req_q <= 1'b1;
          end
          A_SCHED:   if (!sched_busy) sched_req_q <= 1'b1;
          A_TICK:    tick_en_q <= avs_writedata[0];
          default: ;
        endcase
      end

      if (avs_read) begin
        unique case (avs_address)
          A_UPD_PID:  avs_readdata <= upd_pid_q;
          A_UPD_CMD:  avs_readdata <= upd_cmd_q;
          A_STATUS:   avs_readdata <= {26'd0, tick_en_q, tick_irq, next_valid,
                                       sched_busy, upd_err_q, upd_busy};
          A_NEXT_PID: avs_readdata <= next_pid;
          A_TICK:     avs_readdata <= {30'd0, tick_irq, tick_en_q};
          default:    avs_readdata <= '0;
        endcase
      end
    end
  end

  assign irq = tick_irq;

endmodule
