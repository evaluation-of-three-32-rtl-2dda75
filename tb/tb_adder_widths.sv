// tb_adder_widths: the three adders, and the RC adder in its GP-block form,
// at each size for which area is estimated: 8, 16, 32 and 64 bits.
// Each size runs in a width_checker: carry chains of every length plus 1000
// random additions, checked against integer addition, with the precharge /
// evaluate handshake on gco. The 16- and 64-bit completion trees have an even
// number of levels and so also exercise the tree's output inverter.
module tb_adder_widths;
  logic        done8, done16, done32, done64;
  int unsigned c8, c16, c32, c64, f8, f16, f32, f64;

  width_checker #(.W(8))  u8  (.done(done8),  .checks(c8),  .failures(f8));
  width_checker #(.W(16)) u16 (.done(done16), .checks(c16), .failures(f16));
  width_checker #(.W(32)) u32 (.done(done32), .checks(c32), .failures(f32));
  width_checker #(.W(64)) u64 (.done(done64), .checks(c64), .failures(f64));

  initial begin : watchdog
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32 + c64, f8 + f16 + f32 + f64 + 1);
    $finish;
  end

  initial begin
    wait (done8 && done16 && done32 && done64);
    $display("8-bit: %0d, 16-bit: %0d, 32-bit: %0d, 64-bit: %0d checks", c8, c16, c32, c64);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32 + c64, f8 + f16 + f32 + f64);
    $finish;
  end
endmodule
