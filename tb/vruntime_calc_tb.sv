// vruntime_calc_tb: checks the priority weighting of runtime against a
// reference computed here from its own copy of the CFS weight table:
// delta_vr = (delta_ns * floor(2^32 / weight)) >> 22, saturated to 48 bits.
// Covers every nice level, out-of-range priorities, nice 0 identity and
// saturation, and that results stay within 0.01 % of exact division.
module vruntime_calc_tb;
  import flash_pkg::*;

  int checks = 0, failures = 0;
  rt_t   delta_ns;
  prio_t prio;
  vrt_t  delta_vr;

  vruntime_calc dut (.delta_ns, .prio, .delta_vr);

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

  task automatic check(string what, logic [47:0] got, logic [47:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // nice 0: identity
    delta_ns = 48'd123456789; prio = 6'd20; #1;
    check("nice0 identity", delta_vr, 48'd123456789);
    // every level, several deltas
    for (int p = 0; p < 64; p++) begin
      for (int k = 0; k < 8; k++) begin
        delta_ns = {$urandom, $urandom} & 48'h00FF_FFFF_FFFF;
        if (k == 0) delta_ns = 48'd1000000;  // 1 ms
        prio = 6'(p); #1;
        check($sformatf("prio %0d", p), delta_vr, ref_vr(delta_ns, p));
        if (p < 40 && k == 0) begin
          // close to exact 1024/weight scaling
          longint exact;
          exact = longint'(1000000) * 1024 / W[p];
          checks++;
          if (delta_vr > 48'(exact + exact / 10000 + 1) ||
              delta_vr + 48'(exact / 10000 + 1) < 48'(exact)) begin
            failures++;
            $display("FAIL prio %0d: %0d far from exact %0d", p, delta_vr, exact);
          end
        end
      end
    end
    // heavier task ages slower
    delta_ns = 48'd5000000; prio = 6'd10; #1;
    begin
      vrt_t a; a = delta_vr; prio = 6'd30; #1;
      checks++; if (!(a < delta_vr)) begin failures++; $display("FAIL ordering"); end
    end
    // saturation
    delta_ns = 48'h8000_0000_0000; prio = 6'd39; #1;
    check("saturate", delta_vr, 48'hFFFF_FFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
