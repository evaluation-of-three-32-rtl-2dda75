// dcvs_xor: dual-rail DCVS exclusive-OR gate with completion output.
//
// y = x1 XOR x2, evaluated only while the precharge/evaluate control r is high.
// With r low both output rails are low and comp is low. With r high the true
// rail rises for unequal inputs and the complement rail for equal inputs, as
// soon as both input pairs have evaluated; comp (the NAND of the gate's two
// precharged nodes, i.e. the OR of the output rails) then goes high.
//
// The adders use this gate twice per bit: at the input, where it forms the
// propagate pair (P, P-bar) from the operand bits, and at the output, where it
// forms the sum S = C(i-1) XOR P(i) with its completion signal Comp(i).
// Purely combinational; the gate delay is not modelled.
module dcvs_xor
  import dcvs_pkg::*;
(
  input  logic r,     // 0: precharge, 1: evaluate
  input  dr_t  x1,
  input  dr_t  x2,
  output dr_t  y,
  output logic comp   // high once y has evaluated
);

  always_comb begin
    y.t  = r & ((x1.t & x2.f) | (x1.f & x2.t));
    y.f  = r & ((x1.t & x2.t) | (x1.f & x2.f));
    comp = y.t | y.f;
  end

  // both rails high would mean an illegal (11) input pair
  always_comb begin
    assert (!(y.t && y.f)) else $error("dcvs_xor: both output rails high");
  end

endmodule
