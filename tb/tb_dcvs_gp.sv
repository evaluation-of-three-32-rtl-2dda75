// tb_dcvs_gp: exhaustive check of the generate/propagate block against the
// truth table of G, N and P: for every operand pair exactly one of G, N, P is
// high with r high, P-bar = NOT P, and nothing is high with r low.
module tb_dcvs_gp;
  import dcvs_pkg::*;

  logic r, g, n;
  dr_t  a, b, p;
  int unsigned checks = 0, failures = 0;

  dcvs_gp dut (.r(r), .a(a), .b(b), .g(g), .n(n), .p(p));

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
    for (int k = 0; k < 8; k++) begin
      logic av, bv;
      r  = k[2];
      av = k[1];
      bv = k[0];
      a  = dr_of(av);
      b  = dr_of(bv);
      #1;
      if (r) begin
        check(g == (av & bv), "G");
        check(n == (~av & ~bv), "N");
        check(p.t == (av ^ bv), "P");
        check(p.f == ~(av ^ bv), "P-bar");
        check(32'(g) + 32'(n) + 32'(p.t) == 1, "exactly one of G, N, P");
      end else begin
        check(!g && !n && !p.t && !p.f, "precharged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
