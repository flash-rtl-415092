// vruntime_calc: weights a task's physical runtime by its priority.
//
// CFS orders tasks by virtual runtime: nanoseconds of CPU time scaled by
// 1024 / weight(nice), so a high-priority (heavy) task ages slowly and a
// low-priority one fast. FLASH keeps the same relative weighting. As in the
// Linux kernel, the division is replaced by a multiply with the inverse weight
// 2^32 / weight followed by a right shift of 22 (= 32 - 10); the 40-entry
// inverse table is computed at elaboration from the weight table in flash_pkg.
// At nice 0 the inverse is exactly 2^22, so the runtime passes unchanged.
//
// Interface: delta_ns (physical runtime), prio (nice + 20, values above 39
// are treated as 39) -> delta_vr. Purely combinational; the result saturates
// at the maximum 48-bit value instead of wrapping.
module vruntime_calc
  import flash_pkg::*;
(
  input  rt_t   delta_ns,
  input  prio_t prio,
  output vrt_t  delta_vr
);

  typedef logic [31:0] inv_tab_t [NICE_LEVELS];

  function automatic inv_tab_t make_inv_table();
    inv_tab_t t;
    for (int unsigned i = 0; i < NICE_LEVELS; i++) t[i] = nice_inv_weight(i);
    return t;
  endfunction

  localparam inv_tab_t INV_W = make_inv_table();

  logic [5:0]           idx;
  logic [RT_W+32-23:0]  scaled;   // (delta_ns * inverse weight) >> 22

  always_comb begin
    idx      = (prio > prio_t'(NICE_LEVELS - 1)) ? 6'(NICE_LEVELS - 1) : 6'(prio);
    scaled   = (RT_W+10)'(((RT_W+32)'(delta_ns) * (RT_W+32)'(INV_W[idx])) >> 22);
    delta_vr = (|scaled[RT_W+32-23:VR_W]) ? '1 : scaled[VR_W-1:0];
  end

endmodule
