// rc_adder: WIDTH-bit self-timed ripple-carry adder in dual-rail DCVS logic.
//
// Every input and output bit is a complementary pair (see dcvs_pkg). r is the
// precharge/evaluate control: with r low all outputs are low, gco low; after r
// rises the carries ripple bit by bit and gco rises once every sum bit and the
// carry-out have evaluated. A bit whose operands are 11 or 00 generates or
// kills its carry at once, so only runs of propagating bits wait for the
// carry from below; that data dependence is what the completion signal
// exposes.
//
// Slice structure (default, COMPACT = 1): an input EXOR gate forms (P, P-bar)
// from the operand pair, the carry block dcvs_cb_ab takes generate and kill
// straight from the operand rails, and an output EXOR forms S(i) = C(i-1) XOR
// P(i) with its completion Comp(i). This is the structure fabricated at 32
// bits. COMPACT = 0 selects the earlier slice, in which a GP block computes
// G, N, P, P-bar and the carry block dcvs_cb uses G and N; it computes the
// same function with five more transistors per slice.
// Bit i of the vectors is the document's bit i+1; cin is C0, cout is C(WIDTH).
// The completion circuit (completion_tree) is part of the adder. Purely
// combinational apart from the C-element latch inside completion_tree.
module rc_adder
  import dcvs_pkg::*;
#(
  parameter int unsigned WIDTH   = 32,
  parameter bit          COMPACT = 1'b1
) (
  input  logic              r,
  input  dr_t [WIDTH-1:0]   a,
  input  dr_t [WIDTH-1:0]   b,
  input  dr_t               cin,
  output dr_t [WIDTH-1:0]   s,
  output dr_t               cout,
  output logic [WIDTH-1:0]  comp,
  output logic              gco
);

  dr_t c [WIDTH+1];   // c[i] = carry into bit i, c[WIDTH] = carry-out
  dr_t p [WIDTH];

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_slice
    if (COMPACT) begin : g_compact
      logic unused_pcomp;
      dcvs_xor u_pxor (.r(r), .x1(a[i]), .x2(b[i]), .y(p[i]), .comp(unused_pcomp));
      dcvs_cb_ab u_cb (.r(r), .a(a[i]), .b(b[i]), .p(p[i].t), .cin(c[i]), .cout(c[i+1]));
    end else begin : g_gp
      logic g, n;
      dcvs_gp u_gp (.r(r), .a(a[i]), .b(b[i]), .g(g), .n(n), .p(p[i]));
      dcvs_cb u_cb (.r(r), .g(g), .n(n), .p(p[i].t), .cin(c[i]), .cout(c[i+1]));
    end
    dcvs_xor u_sxor (.r(r), .x1(c[i]), .x2(p[i]), .y(s[i]), .comp(comp[i]));
  end

  assign cout = c[WIDTH];

  completion_tree #(.WIDTH(WIDTH)) u_done (.comp(comp), .cout(cout), .gco(gco));

endmodule
