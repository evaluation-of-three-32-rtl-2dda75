// tb_dcvs_xor: exhaustive check of the dual-rail EXOR gate.
// Each input pair takes its three legal states (unevaluated, 0, 1) and r both
// values. Expected: with r low, all outputs low; with r high and both inputs
// evaluated, y = x1 XOR x2 on the true rail and its complement on the other,
// comp high; with r high and an input unevaluated, y unevaluated, comp low.
module tb_dcvs_xor;
  import dcvs_pkg::*;

  logic r, comp;
  dr_t  x1, x2, y;
  int unsigned checks = 0, failures = 0;

  dcvs_xor dut (.r(r), .x1(x1), .x2(x2), .y(y), .comp(comp));

  function automatic dr_t st(input int k);
    return (k == 0) ? DR_SPACER : dr_of(1'(k - 1));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rv = 0; rv < 2; rv++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          logic valid, val;
          r  = 1'(rv);
          x1 = st(i);
          x2 = st(j);
          #1;
          valid = (rv == 1) && (i != 0) && (j != 0);
          val   = (i == 2) ^ (j == 2);
          check(comp == valid, $sformatf("comp r=%0d i=%0d j=%0d", rv, i, j));
          check(y.t == (valid & val) && y.f == (valid & ~val),
                $sformatf("y r=%0d i=%0d j=%0d", rv, i, j));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
