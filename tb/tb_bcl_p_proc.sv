// tb_bcl_p_proc: exhaustive check of the P processor: with r high it pulls
// the generate line for operand bits 11, the complement-generate line for 00
// and neither for 01 or 10; with r low it pulls nothing.
module tb_bcl_p_proc;
  import dcvs_pkg::*;

  logic r, pull_g, pull_n;
  dr_t  a, b;
  int unsigned checks = 0, failures = 0;

  bcl_p_proc dut (.r(r), .a(a), .b(b), .pull_g(pull_g), .pull_n(pull_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      r = k[2];
      a = dr_of(k[1]);
      b = dr_of(k[0]);
      #1;
      checks++;
      if (pull_g != (k == 7) || pull_n != (k == 4)) begin
        failures++;
        $display("FAIL r=%0d a=%0d b=%0d", k[2], k[1], k[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
