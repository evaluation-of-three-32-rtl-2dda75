// dcvs_cb_ab: carry block of the compact ripple-carry slice.
//
// Generate and kill are taken straight from the operand rails instead of a
// separate GP block:
//   C(i)     = A(i).B(i)         + P(i).C(i-1)
//   C-bar(i) = A-bar(i).B-bar(i) + P(i).C-bar(i-1)
// P(i) is the true rail of the input EXOR gate of the same bit. With r low
// both outputs are low.
module dcvs_cb_ab
  import dcvs_pkg::*;
(
  input  logic r,
  input  dr_t  a,
  input  dr_t  b,
  input  logic p,
  input  dr_t  cin,
  output dr_t  cout
);

  always_comb begin
    cout.t = r & ((a.t & b.t) | (p & cin.t));
    cout.f = r & ((a.f & b.f) | (p & cin.f));
  end

endmodule
