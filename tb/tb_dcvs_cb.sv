// tb_dcvs_cb: exhaustive check of the GP-driven carry block. (G, N, P) takes
// each of its three legal one-hot states, the incoming carry its three
// dual-rail states, r both values. Expected carry: generate gives 1 and kill
// gives 0 regardless of the incoming carry; propagate copies the incoming
// carry, including its unevaluated state; r low gives an unevaluated output.
module tb_dcvs_cb;
  import dcvs_pkg::*;

  logic r, g, n, p;
  dr_t  cin, cout;
  int unsigned checks = 0, failures = 0;

  dcvs_cb dut (.r(r), .g(g), .n(n), .p(p), .cin(cin), .cout(cout));

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
      for (int m = 0; m < 3; m++)       // 0: generate, 1: kill, 2: propagate
        for (int c = 0; c < 3; c++) begin
          logic et, ef;
          r   = 1'(rv);
          g   = (m == 0);
          n   = (m == 1);
          p   = (m == 2);
          cin = (c == 0) ? DR_SPACER : dr_of(1'(c - 1));
          #1;
          et = (rv == 1) && ((m == 0) || (m == 2 && c == 2));
          ef = (rv == 1) && ((m == 1) || (m == 2 && c == 1));
          check(cout.t == et && cout.f == ef, $sformatf("r=%0d mode=%0d cin=%0d", rv, m, c));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
