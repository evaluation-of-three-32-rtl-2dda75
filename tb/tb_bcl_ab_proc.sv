// tb_bcl_ab_proc: exhaustive check of the A and B processors (one instance
// of each). For every r, p_in, legal (g^, n^, p^) state and row-line value:
// pull_g = r.p_in.g^, pull_n = r.p_in.n^, p_out = r.p_in.p^; the A processor
// exports the row lines, the B processor exports nothing.
module tb_bcl_ab_proc;
  logic r, p_in, g_hat, n_hat, p_hat, row_g, row_n;
  logic a_pg, a_pn, a_p, a_g, a_n;
  logic b_pg, b_pn, b_p, b_g, b_n;
  int unsigned checks = 0, failures = 0;

  bcl_ab_proc #(.EXPORT(1'b1)) dut_a (
    .r(r), .p_in(p_in), .g_hat(g_hat), .n_hat(n_hat), .p_hat(p_hat),
    .row_g(row_g), .row_n(row_n), .pull_g(a_pg), .pull_n(a_pn), .p_out(a_p),
    .g_out(a_g), .n_out(a_n));
  bcl_ab_proc #(.EXPORT(1'b0)) dut_b (
    .r(r), .p_in(p_in), .g_hat(g_hat), .n_hat(n_hat), .p_hat(p_hat),
    .row_g(row_g), .row_n(row_n), .pull_g(b_pg), .pull_n(b_pn), .p_out(b_p),
    .g_out(b_g), .n_out(b_n));

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
      for (int pi = 0; pi < 2; pi++)
        for (int m = 0; m < 3; m++)
          for (int l = 0; l < 3; l++) begin
            r     = 1'(rv);
            p_in  = 1'(pi);
            g_hat = (m == 0);
            n_hat = (m == 1);
            p_hat = (m == 2);
            row_g = (l == 1);
            row_n = (l == 2);
            #1;
            check(a_pg == (r & p_in & g_hat) && b_pg == a_pg, "pull_g");
            check(a_pn == (r & p_in & n_hat) && b_pn == a_pn, "pull_n");
            check(a_p == (r & p_in & p_hat) && b_p == a_p, "p_out");
            check(a_g == row_g && a_n == row_n, "A exports row lines");
            check(!b_g && !b_n, "B exports nothing");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
