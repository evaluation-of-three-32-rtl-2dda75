// scan_in: serial loader for the adders' operands.
//
// The test chip has too few pads to bring the operands out in parallel, so
// they are shifted in one bit per clock. While shift is high, each rising
// clk edge moves the register one place towards bit 0 and loads sdi into bit
// N-1; after N shifts the first bit sent sits in bit 0. While shift is low
// the register holds and q drives the adders' inputs as static levels. sdo
// (bit 0) allows chains to be cascaded. The chain length, bit order and
// clocking are this design's choice; the document only names the circuit.
module scan_in #(
  parameter int unsigned N = 65
) (
  input  logic         clk,
  input  logic         shift,
  input  logic         sdi,
  output logic [N-1:0] q,
  output logic         sdo
);

  always_ff @(posedge clk) begin
    if (shift) q <= {sdi, q[N-1:1]};
  end

  assign sdo = q[0];

endmodule
