// timer_tick_gen_tb: checks that the tick comes exactly every TICK_CYCLES
// cycles while enabled (first one TICK_CYCLES cycles after enable), is one
// cycle wide, and stops and restarts with the enable.
module timer_tick_gen_tb;
  localparam int T = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, tick;
  int cyc = 0, last_tick = -1, en_cyc = 0, nticks = 0;

  timer_tick_gen #(.TICK_CYCLES(T)) dut (.clk, .rst_n, .en, .tick);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (tick) begin
      checks++;
      nticks++;
      if (!en) begin failures++; $display("FAIL tick while disabled"); end
      else if (last_tick < 0) begin
        if (cyc - en_cyc != T) begin failures++; $display("FAIL first tick after %0d", cyc - en_cyc); end
      end else if (cyc - last_tick != T) begin
        failures++; $display("FAIL period %0d", cyc - last_tick);
      end
      last_tick = cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20) @(posedge clk);
    @(negedge clk); en = 1; en_cyc = cyc; last_tick = -1;
    repeat (10 * T + 3) @(posedge clk);
    checks++; if (nticks != 10) begin failures++; $display("FAIL %0d ticks, expected 10", nticks); end
    @(negedge clk); en = 0;
    repeat (3 * T) @(posedge clk);
    checks++; if (nticks != 10) begin failures++; $display("FAIL ticks while disabled"); end
    @(negedge clk); en = 1; en_cyc = cyc; last_tick = -1;
    repeat (2 * T + 1) @(posedge clk);
    checks++; if (nticks != 12) begin failures++; $display("FAIL restart: %0d", nticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
