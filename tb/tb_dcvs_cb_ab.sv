// tb_dcvs_cb_ab: exhaustive check of the compact carry block, which takes
// generate (A.B) and kill (A-bar.B-bar) from the operand rails. All operand
// values, all three incoming-carry states and both r values; P is driven as
// A XOR B, as the input EXOR gate supplies it.
module tb_dcvs_cb_ab;
  import dcvs_pkg::*;

  logic r, p;
  dr_t  a, b, cin, cout;
  int unsigned checks = 0, failures = 0;

  dcvs_cb_ab dut (.r(r), .a(a), .b(b), .p(p), .cin(cin), .cout(cout));

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
      for (int k = 0; k < 4; k++)
        for (int c = 0; c < 3; c++) begin
          logic av, bv, et, ef;
          av  = k[1];
          bv  = k[0];
          r   = 1'(rv);
          a   = dr_of(av);
          b   = dr_of(bv);
          p   = r & (av ^ bv);
          cin = (c == 0) ? DR_SPACER : dr_of(1'(c - 1));
          #1;
          et = (rv == 1) && ((av & bv) || ((av ^ bv) && c == 2));
          ef = (rv == 1) && ((!av & !bv) || ((av ^ bv) && c == 1));
          check(cout.t == et && cout.f == ef, $sformatf("r=%0d a=%0d b=%0d cin=%0d", rv, av, bv, c));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
