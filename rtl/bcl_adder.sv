// bcl_adder: WIDTH-bit self-timed binary carry look-ahead adder in dual-rail
// DCVS logic, with carries delivered straight from shared row lines.
//
// Stage 1: an input EXOR gate per bit forms (P, P-bar). Stage 2: the carry
// network has one row per bit i (1..WIDTH, bit i-1 of the vectors). Row i
// holds
//   * a P processor (generate/kill of bit i),
//   * m = floor(log2 i) A or B processors; the one in column j combines the
//     row's group (i .. i-2^(j-1)+1) with the group of row i-2^(j-1),
//     doubling the span of the row's group each column (a Kogge-Stone style
//     tree),
//   * a C processor that, once the group (i .. i-2^m+1) propagates, copies the
//     carry C(i-2^m) of a lower row (C0 for i = 2^m) into the row.
// All processors of a row pull the same two lines, G(i) and N(i). Every pull
// is sound on its own: a group that generates forces C(i) = 1 and a group
// that kills forces C(i) = 0 whatever lies below it, and G and N can never
// both be pulled. The lines therefore settle to C(i) and C-bar(i) as soon as
// any processor of the row decides the carry, without the result walking
// through the rest of the row. A processor whose output a higher row uses is
// an A processor (it exports the row lines); the others are B processors.
// For WIDTH = 8 this gives the arrangement P,C / P,A,C / P,A,C / P,A,A,C /
// P,A,B,C / P,A,B,C / P,B,B,C / P,B,B,B,C for rows 1..8; the longest row has
// log2(WIDTH)+2 processors. The carry-in reaches the C processors through
// plain buffers, which are wires here.
// Stage 3: output EXOR S(i) = C(i-1) XOR P(i) with Comp(i); completion_tree
// produces gco. Interface and timing as rc_adder.
// The processors, the shared row lines and the 8-bit arrangement follow the
// published design; the rule that extends that arrangement to any WIDTH is
// this design's reading of it.
module bcl_adder
  import dcvs_pkg::*;
#(
  parameter int unsigned WIDTH = 32
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

  function automatic int unsigned flog2(input int unsigned v);
    int unsigned k = 0;
    while ((v >> (k + 1)) != 0) k++;
    return k;
  endfunction

  // Each row and each column of a row is a generate scope of its own, and the
  // rows read each other's signals by hierarchical name, so that no array
  // couples the rows into one apparent combinational loop.
  for (genvar i = 1; i <= WIDTH; i++) begin : g_row
    localparam int unsigned M = flog2(i);
    dr_t          p;               // propagate pair of bit i
    dr_t          cin_row;         // carry handed to the C processor
    dr_t          c_in_bit;        // carry into bit i, C(i-1)
    dr_t          c;               // C(i)
    logic         row_g, row_n;    // the row's shared lines
    logic [M+1:0] pull_g, pull_n;  // [0] P processor, [1..M] A/B, [M+1] C
    logic         unused_pcomp;

    dcvs_xor u_pxor (.r(r), .x1(a[i-1]), .x2(b[i-1]), .y(p), .comp(unused_pcomp));

    for (genvar j = 0; j <= M; j++) begin : g_col
      logic grp_p;   // propagate of the row's group after this column
      logic exp_g;   // generate / complement generate seen by higher rows
      logic exp_n;
      if (j == 0) begin : g_p
        bcl_p_proc u_p (.r(r), .a(a[i-1]), .b(b[i-1]),
                        .pull_g(pull_g[0]), .pull_n(pull_n[0]));
        assign grp_p = p.t;
        assign exp_g = row_g;
        assign exp_n = row_n;
      end else begin : g_ab
        localparam int unsigned PARTNER = i - (1 << (j - 1));
        localparam bit          IS_A    = (i + (1 << j)) <= WIDTH;
        bcl_ab_proc #(.EXPORT(IS_A)) u_ab (
          .r     (r),
          .p_in  (g_col[j-1].grp_p),
          .g_hat (g_row[PARTNER].g_col[j-1].exp_g),
          .n_hat (g_row[PARTNER].g_col[j-1].exp_n),
          .p_hat (g_row[PARTNER].g_col[j-1].grp_p),
          .row_g (row_g),
          .row_n (row_n),
          .pull_g(pull_g[j]),
          .pull_n(pull_n[j]),
          .p_out (grp_p),
          .g_out (exp_g),
          .n_out (exp_n)
        );
      end
    end

    if (i == (1 << M)) begin : g_c0
      assign cin_row = cin;        // carry-in through the buffer chain
    end else begin : g_cx
      assign cin_row = g_row[i - (1 << M)].c;
    end

    bcl_c_proc u_c (
      .r     (r),
      .p_in  (g_col[M].grp_p),
      .cin   (cin_row),
      .row_g (row_g),
      .row_n (row_n),
      .pull_g(pull_g[M+1]),
      .pull_n(pull_n[M+1]),
      .c     (c)
    );

    assign row_g = |pull_g;
    assign row_n = |pull_n;

    // generate and complement generate exclude each other, so no two
    // processors of a row may ever pull opposite lines
    always_comb begin
      assert (!(row_g && row_n))
        else $error("bcl_adder: row %0d pulls both carry lines", i);
    end

    if (i == 1) begin : g_s0
      assign c_in_bit = cin;
    end else begin : g_sx
      assign c_in_bit = g_row[i-1].c;
    end

    dcvs_xor u_sxor (.r(r), .x1(c_in_bit), .x2(p), .y(s[i-1]), .comp(comp[i-1]));
  end

  assign cout = g_row[WIDTH].c;

  completion_tree #(.WIDTH(WIDTH)) u_done (.comp(comp), .cout(cout), .gco(gco));

endmodule
