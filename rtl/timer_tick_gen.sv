// timer_tick_gen: the scheduler's own timer tick.
//
// FLASH generates the periodic tick itself instead of relying on the CPU's
// timer. While en is high, a counter runs from 0 to TICK_CYCLES-1 and tick
// pulses high for one cycle each time it wraps, i.e. once every TICK_CYCLES
// cycles, the first pulse TICK_CYCLES cycles after en rises. With the
// document's 50 MHz clock the default of 50,000 cycles gives a 1 kHz tick,
// the most interactive rate Linux supports. The interval is fixed at build
// time and the counter restarts when en drops; both are this design's choices.
module timer_tick_gen #(
  parameter int unsigned TICK_CYCLES = 50000,
  localparam int unsigned CNT_W = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);

  logic [CNT_W-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      cnt_q <= '0;
      tick  <= 1'b0;
    end else if (int'(cnt_q) == TICK_CYCLES - 1) begin
      cnt_q <= '0;
      tick  <= 1'b1;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      tick  <= 1'b0;
    end
  end

endmodule
