// tb_dcvs_cla4: exhaustive check of the 4-bit multi-output carry look-ahead
// gate. Every bit takes each legal (G, N, P) state (3^4 combinations) and the
// carry-in each of its three dual-rail states. Expected carries are computed
// bit by bit from the recurrence C(k) = G(k) + P(k)C(k-1), with an
// unevaluated carry-in reaching exactly the carries that only propagate from
// it. all_p must be high exactly when all four bits propagate; that case is
// counted and must occur.
module tb_dcvs_cla4;
  import dcvs_pkg::*;

  logic       r, all_p;
  logic [3:0] g, n, p;
  dr_t        cin;
  dr_t        cout [4];
  int unsigned checks = 0, failures = 0, bypass = 0;

  dcvs_cla4 #(.GROUP(4)) dut (.r(r), .g(g), .n(n), .p(p), .cin(cin), .cout(cout), .all_p(all_p));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
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
      for (int code = 0; code < 81; code++)
        for (int c = 0; c < 3; c++) begin
          logic et, ef;
          int   x;
          r = 1'(rv);
          x = code;
          for (int k = 0; k < 4; k++) begin
            g[k] = (x % 3 == 0);
            n[k] = (x % 3 == 1);
            p[k] = (x % 3 == 2);
            x    = x / 3;
          end
          cin = (c == 0) ? DR_SPACER : dr_of(1'(c - 1));
          #1;
          et = (c == 2);
          ef = (c == 1);
          for (int k = 0; k < 4; k++) begin
            et = g[k] | (p[k] & et);
            ef = n[k] | (p[k] & ef);
            check(cout[k].t == (rv == 1 && et) && cout[k].f == (rv == 1 && ef),
                  $sformatf("r=%0d code=%0d cin=%0d carry %0d", rv, code, c, k + 1));
          end
          check(all_p == (rv == 1 && p == 4'hF), "all_p");
          if (rv == 1 && p == 4'hF && c != 0) bypass++;
        end
    check(bypass > 0, "bypass case never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
