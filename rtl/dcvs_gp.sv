// dcvs_gp: carry generate / propagate block of one bit.
//
// From the dual-rail operand bits A(i), B(i) it forms, in one shared DCVS
// structure, the three mutually exclusive signals
//   G = A.B          (carry generate)
//   N = A-bar.B-bar  (complement-carry generate, "kill")
//   P = A XOR B      (carry propagate)
// and P-bar = G + N. Exactly one of G, N, P is high after evaluation, none
// during precharge (r low). Used in every bit of the carry look-ahead adder
// and of the alternative ripple-carry slice.
module dcvs_gp
  import dcvs_pkg::*;
(
  input  logic r,
  input  dr_t  a,
  input  dr_t  b,
  output logic g,
  output logic n,
  output dr_t  p      // p.t = P, p.f = P-bar
);

  always_comb begin
    g   = r & a.t & b.t;
    n   = r & a.f & b.f;
    p.t = r & ((a.t & b.f) | (a.f & b.t));
    p.f = g | n;
  end

endmodule
