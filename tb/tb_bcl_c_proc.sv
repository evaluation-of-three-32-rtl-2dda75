// tb_bcl_c_proc: exhaustive check of the C processor: with r and p_in high
// it pulls the generate line for an incoming carry of 1 and the
// complement-generate line for 0, nothing for an unevaluated carry or when
// r or p_in is low; its carry output is the pair of row lines.
module tb_bcl_c_proc;
  import dcvs_pkg::*;

  logic r, p_in, row_g, row_n, pull_g, pull_n;
  dr_t  cin, c;
  int unsigned checks = 0, failures = 0;

  bcl_c_proc dut (.r(r), .p_in(p_in), .cin(cin), .row_g(row_g), .row_n(row_n),
                  .pull_g(pull_g), .pull_n(pull_n), .c(c));

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
        for (int cv = 0; cv < 3; cv++)
          for (int l = 0; l < 3; l++) begin
            r     = 1'(rv);
            p_in  = 1'(pi);
            cin   = (cv == 0) ? DR_SPACER : dr_of(1'(cv - 1));
            row_g = (l == 1);
            row_n = (l == 2);
            #1;
            check(pull_g == (rv == 1 && pi == 1 && cv == 2), "pull_g");
            check(pull_n == (rv == 1 && pi == 1 && cv == 1), "pull_n");
            check(c.t == row_g && c.f == row_n, "carry output");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
