// dcvs_cb: carry block of one ripple-carry slice driven by a GP block.
//
//   C(i)     = G(i) + P(i).C(i-1)
//   C-bar(i) = N(i) + P(i).C-bar(i-1)
// The propagate transistor is shared by both halves, since P passes the carry
// and its complement alike. With r low both outputs are low. A generated or
// killed carry evaluates without waiting for the incoming carry.
module dcvs_cb
  import dcvs_pkg::*;
(
  input  logic r,
  input  logic g,
  input  logic n,
  input  logic p,
  input  dr_t  cin,   // C(i-1)
  output dr_t  cout   // C(i)
);

  always_comb begin
    cout.t = r & (g | (p & cin.t));
    cout.f = r & (n | (p & cin.f));
  end

endmodule
