// bcl_ab_proc: "A" and "B" processors of the binary carry look-ahead adder,
// the differential form of the concatenation operator o:
//   g_out = g_in + g^_in.p_in,  n_out = n_in + n^_in.p_in,  p_out = p_in.p^_in
// Here g_in and n_in are not separate signals: they are the row's shared
// lines, which this processor pulls when p_in.g^_in (resp. p_in.n^_in) holds.
// (g^, n^, p^) come from a processor of a lower row; p_in is the group
// propagate handed along the row by the previous processor, and p_out goes on
// to the next one.
// EXPORT = 1 gives an A processor, which also buffers the row lines and its
// p_out as outputs for a processor in a higher row. EXPORT = 0 gives a B
// processor, whose result is only needed inside its own row; its g_out and
// n_out outputs are then held low.
// With r low every output is low. Combinational.
module bcl_ab_proc
  import dcvs_pkg::*;
#(
  parameter bit EXPORT = 1'b1
) (
  input  logic r,
  input  logic p_in,
  input  logic g_hat,
  input  logic n_hat,
  input  logic p_hat,
  input  logic row_g,    // state of the row's generate line
  input  logic row_n,    // state of the row's complement-generate line
  output logic pull_g,
  output logic pull_n,
  output logic p_out,
  output logic g_out,    // A only: row_g buffered for another row
  output logic n_out     // A only: row_n buffered for another row
);

  assign pull_g = r & p_in & g_hat;
  assign pull_n = r & p_in & n_hat;
  assign p_out  = r & p_in & p_hat;

  if (EXPORT) begin : g_a
    assign g_out = row_g;
    assign n_out = row_n;
  end else begin : g_b
    logic unused_row;
    assign unused_row = row_g ^ row_n;
    assign g_out = 1'b0;
    assign n_out = 1'b0;
  end

endmodule
