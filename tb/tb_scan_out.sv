// tb_scan_out: captures random 66-bit words and reads them back serially,
// checking every bit on sdo, and that load wins over shift.
module tb_scan_out;
  localparam int unsigned N = 66;

  logic         clk = 1'b0, load, shift, sdo;
  logic [N-1:0] d;
  int unsigned checks = 0, failures = 0, cycles = 0;

  scan_out #(.N(N)) dut (.clk(clk), .load(load), .shift(shift), .d(d), .sdo(sdo));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load  = 1'b0;
    shift = 1'b0;
    for (int n = 0; n < 50; n++) begin
      logic [N-1:0] word;
      word = {$urandom, $urandom, $urandom};
      @(negedge clk);
      d     = word;
      load  = 1'b1;
      shift = 1'(n % 2);        // load must take precedence
      @(negedge clk);
      load  = 1'b0;
      shift = 1'b1;
      d     = ~word;
      for (int i = 0; i < N; i++) begin
        check(sdo == word[i], $sformatf("bit %0d", i));
        @(negedge clk);
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
