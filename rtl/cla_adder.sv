// cla_adder: WIDTH-bit self-timed carry look-ahead adder in dual-rail DCVS
// logic, built as WIDTH/GROUP multi-output CLA gates connected in series.
//
// Each bit has a GP block (G, N, P, P-bar); each group of GROUP bits has a
// dcvs_cla4 gate that forms all the group's carries at once from its carry-in
// and hands its last carry to the next group; each bit has an output EXOR
// S(i) = C(i-1) XOR P(i) with completion Comp(i). A group whose bits all
// propagate passes its carry-in through the bypass path; the all_p output
// shows, per group, when that happened. completion_tree produces gco.
// The fabricated 32-bit adder uses eight 4-bit groups (the defaults).
// Interface and timing as rc_adder: r low precharges (all outputs low), r
// high evaluates, gco rises when sum and carry-out are complete.
module cla_adder
  import dcvs_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned GROUP = 4    // WIDTH must be a multiple of GROUP
) (
  input  logic                    r,
  input  dr_t [WIDTH-1:0]         a,
  input  dr_t [WIDTH-1:0]         b,
  input  dr_t                     cin,
  output dr_t [WIDTH-1:0]         s,
  output dr_t                     cout,
  output logic [WIDTH-1:0]        comp,
  output logic [WIDTH/GROUP-1:0]  all_p,   // group bypass active
  output logic                    gco
);

  localparam int unsigned NGROUPS = WIDTH / GROUP;

  logic [WIDTH-1:0] g, n;
  dr_t              p [WIDTH];
  dr_t              c [WIDTH+1];   // c[i] = carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    dcvs_gp  u_gp   (.r(r), .a(a[i]), .b(b[i]), .g(g[i]), .n(n[i]), .p(p[i]));
    dcvs_xor u_sxor (.r(r), .x1(c[i]), .x2(p[i]), .y(s[i]), .comp(comp[i]));
  end

  for (genvar k = 0; k < NGROUPS; k++) begin : g_group
    logic [GROUP-1:0] pt;
    dr_t              gc [GROUP];
    for (genvar j = 0; j < GROUP; j++) begin : g_pt
      assign pt[j]               = p[k*GROUP+j].t;
      assign c[k*GROUP+j+1]      = gc[j];
    end
    dcvs_cla4 #(.GROUP(GROUP)) u_cla (
      .r    (r),
      .g    (g[k*GROUP +: GROUP]),
      .n    (n[k*GROUP +: GROUP]),
      .p    (pt),
      .cin  (c[k*GROUP]),
      .cout (gc),
      .all_p(all_p[k])
    );
  end

  assign cout = c[WIDTH];

  completion_tree #(.WIDTH(WIDTH)) u_done (.comp(comp), .cout(cout), .gco(gco));

endmodule
