// bcl_c_proc: last ("C") processor of a row of the binary carry look-ahead
// adder.
//
// When the row's group propagate p_in is high it copies the carry that
// arrives from a lower row (or the adder's carry-in) onto the row's shared
// lines: it pulls the generate line for a carry of 1 and the
// complement-generate line for a carry of 0. It then drives the row's lines,
// which by now hold the row's carry, as the dual-rail carry C(i) to the sum
// gate and to higher rows. With r low it pulls nothing.
module bcl_c_proc
  import dcvs_pkg::*;
(
  input  logic r,
  input  logic p_in,
  input  dr_t  cin,      // carry from a lower row
  input  logic row_g,
  input  logic row_n,
  output logic pull_g,
  output logic pull_n,
  output dr_t  c         // C(i) = (G(i), N(i)) of the row
);

  assign pull_g = r & p_in & cin.t;
  assign pull_n = r & p_in & cin.f;
  assign c.t    = row_g;
  assign c.f    = row_n;

endmodule
