// completion_tree: global completion detector of one adder.
//
// Produces the global completion signal GCo from the WIDTH bit completion
// signals Comp(i) of the sum gates and from the dual-rail carry-out.
//   * A binary tree of log2(WIDTH) levels of two-input cells detects that all
//     Comp(i) are high. Levels alternate between N cells (output high while
//     precharged, low once both inputs are high) and P cells (output low while
//     precharged, high once both inputs are low); the first level is N.
//     Logically an N cell is a NAND and a P cell a NOR.
//   * A NOR of the two carry-out rails gives the carry completion, low once
//     the carry-out has evaluated (Comp33 for a 32-bit adder, active low here).
//   * A two-input Muller C-element with inverted output combines the tree
//     output (in its active-low form) and the carry completion: GCo rises
//     when both report completion and falls only when both report precharge;
//     otherwise it holds. The C-element is written as a latch.
// For 32 bits the tree has five levels N-P-N-P-N, whose last output is
// already active low. With an even number of levels (a WIDTH such as 16 used
// for tests) the last level is a P cell and an inverter is added.
// Timing: GCo rises with the last of the WIDTH+1 completions. On the way back
// it falls once the carry completion and the tree have returned; since the
// tree is a plain NAND/NOR tree, it returns as soon as any Comp(i) falls. The
// circuit relies on every sum gate precharging in about the same time (they
// are identical EXOR gates on the same R), which replaces the full
// (WIDTH+1)-input Muller C-element and its delay. Inputs are assumed
// monotonic, as they are in precharged dual-rail logic.
module completion_tree
  import dcvs_pkg::*;
#(
  parameter int unsigned WIDTH = 32   // power of two, at least 2
) (
  input  logic [WIDTH-1:0] comp,
  input  dr_t              cout,
  output logic             gco
);

  localparam int unsigned LEVELS = $clog2(WIDTH);

  // node[l] holds the 2**(LEVELS-l) outputs of level l; node[0] = comp
  logic [WIDTH-1:0] node [LEVELS+1];
  logic             tree_done_n;   // low once every Comp(i) is high
  logic             comp_co_n;     // low once the carry-out has evaluated

  assign node[0] = comp;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned CELLS = WIDTH >> l;
    for (genvar c = 0; c < CELLS; c++) begin : g_cell
      if (l % 2 == 1) begin : g_n
        assign node[l][c] = ~(node[l-1][2*c] & node[l-1][2*c+1]);
      end else begin : g_p
        assign node[l][c] = ~(node[l-1][2*c] | node[l-1][2*c+1]);
      end
    end
    if (CELLS < WIDTH) begin : g_unused
      assign node[l][WIDTH-1:CELLS] = '0;
    end
  end

  if (LEVELS % 2 == 1) begin : g_odd
    assign tree_done_n = node[LEVELS][0];
  end else begin : g_even
    assign tree_done_n = ~node[LEVELS][0];
  end

  assign comp_co_n = ~(cout.t | cout.f);

  // inverted-output C-element
  always_latch begin
    if (!tree_done_n && !comp_co_n) gco = 1'b1;
    else if (tree_done_n && comp_co_n) gco = 1'b0;
  end

endmodule
