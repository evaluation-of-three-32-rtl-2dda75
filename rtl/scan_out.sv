// scan_out: parallel-capture, serial-read result register.
//
// On a rising clk edge with load high it captures d (the adders' results);
// with load low and shift high it shifts one place towards bit 0, so sdo
// presents d[0], d[1], ... on successive clocks. Load takes precedence. The
// chain length, bit order and clocking are this design's choice; the
// document only names the circuit.
module scan_out #(
  parameter int unsigned N = 66
) (
  input  logic         clk,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] d,
  output logic         sdo
);

  logic [N-1:0] q;

  always_ff @(posedge clk) begin
    if (load)       q <= d;
    else if (shift) q <= {1'b0, q[N-1:1]};
  end

  assign sdo = q[0];

endmodule
