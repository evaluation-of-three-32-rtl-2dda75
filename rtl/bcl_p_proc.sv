// bcl_p_proc: first ("P") processor of a row of the binary carry look-ahead
// adder.
//
// It pulls the row's shared generate line when the operand bits are 11
// (A.B) and the row's shared complement-generate line when they are 00
// (A-bar.B-bar). In the circuit it also precharges both shared lines and
// holds them with weak keepers; here a line is the OR of the pull requests of
// the processors of the row (see bcl_adder). Its propagate output is the
// row's P(i) from the input EXOR gate and needs no logic of its own here.
// With r low it pulls nothing.
module bcl_p_proc
  import dcvs_pkg::*;
(
  input  logic r,
  input  dr_t  a,
  input  dr_t  b,
  output logic pull_g,   // discharge request for the G-bar line of the row
  output logic pull_n    // discharge request for the N-bar line of the row
);

  assign pull_g = r & a.t & b.t;
  assign pull_n = r & a.f & b.f;

endmodule
