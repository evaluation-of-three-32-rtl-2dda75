// tb_scan_in: shifts random 65-bit words into the operand chain and checks
// the parallel output after 65 clocks, that the register holds while shift is
// low, and the serial output.
module tb_scan_in;
  localparam int unsigned N = 65;

  logic         clk = 1'b0, shift, sdi, sdo;
  logic [N-1:0] q;
  int unsigned checks = 0, failures = 0, cycles = 0;

  scan_in #(.N(N)) dut (.clk(clk), .shift(shift), .sdi(sdi), .q(q), .sdo(sdo));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 1'b0;
    sdi   = 1'b0;
    for (int n = 0; n < 50; n++) begin
      logic [N-1:0] word;
      word = {$urandom, $urandom, $urandom};
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        shift = 1'b1;
        sdi   = word[i];
      end
      @(negedge clk);
      shift = 1'b0;
      sdi   = ~sdi;
      check(q == word, "parallel word after shifting");
      check(sdo == word[0], "serial output");
      repeat (3) @(negedge clk);
      check(q == word, "hold with shift low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
