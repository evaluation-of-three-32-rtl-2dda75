// tb_cla_adder: self-checking testbench for cla_adder at its full 32-bit width.
//
// Every addition runs one complete self-timed cycle: with r low it checks the
// precharged state (all rails, Comp(i) and gco low), raises r, checks the sum
// and carry-out rails against a + b + cin computed here with plain integer
// arithmetic, checks that every Comp(i) and gco are high, lowers r again and
// checks that gco falls. Operands are directed (carry chains of every length
// from 0 to 31, all-ones, zero) and random.
// A second test holds the carry-in in its precharged (unevaluated) state
// while r is high. Bits whose incoming carry is decided by a generate or kill
// below them must complete and be right; bits reached only through
// propagating bits from the carry-in must stay unevaluated, and gco must stay
// low. Releasing the carry-in must then complete the addition. This is the
// data-dependent completion a self-timed adder exists for; the number of
// bits that completed early is reported and must be above zero.
module tb_cla_adder;
  import dcvs_pkg::*;

  localparam int unsigned WIDTH = 32;

  logic              r;
  dr_t [WIDTH-1:0]   a, b, s;
  dr_t               cin, cout;
  logic [WIDTH-1:0]  comp;
  logic              gco;
  logic [WIDTH/4-1:0] all_p;

  int unsigned checks = 0, failures = 0;
  int unsigned early_bits = 0, waiting_bits = 0, bypass_seen = 0;

  cla_adder dut (.r(r), .a(a), .b(b), .cin(cin), .s(s), .cout(cout), .comp(comp), .all_p(all_p), .gco(gco));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic drive(input logic [WIDTH-1:0] av, input logic [WIDTH-1:0] bv);
    for (int i = 0; i < WIDTH; i++) begin
      a[i] = dr_of(av[i]);
      b[i] = dr_of(bv[i]);
    end
  endtask

  task automatic check_precharged();
    logic any;
    any = 1'b0;
    for (int i = 0; i < WIDTH; i++) any |= s[i].t | s[i].f;
    check(!any && !cout.t && !cout.f && comp == '0, "outputs not precharged");
    check(!gco, "gco high in precharge");
  endtask

  task automatic add(input logic [WIDTH-1:0] av, input logic [WIDTH-1:0] bv, input logic ci);
    logic [WIDTH:0] ref_sum;
    logic [WIDTH-1:0] st, sf;
    r = 1'b0;
    drive(av, bv);
    cin = dr_of(ci);
    #1;
    check_precharged();
    r = 1'b1;
    #1;
    ref_sum = {1'b0, av} + {1'b0, bv} + {{WIDTH{1'b0}}, ci};
    for (int i = 0; i < WIDTH; i++) begin
      st[i] = s[i].t;
      sf[i] = s[i].f;
    end
    check(st == ref_sum[WIDTH-1:0], $sformatf("sum %h+%h+%0d: got %h", av, bv, ci, st));
    check(sf == ~ref_sum[WIDTH-1:0], "sum complement rails");
    check(cout.t == ref_sum[WIDTH] && cout.f == ~ref_sum[WIDTH], "carry-out rails");
    check(comp == '1, "bit completions");
    check(gco, "gco not raised");
    for (int k = 0; k < WIDTH/4; k++) begin
      logic all_prop;
      all_prop = &(av[4*k +: 4] ^ bv[4*k +: 4]);
      check(all_p[k] == all_prop, "bypass flag");
      if (all_prop) bypass_seen++;
    end
    r = 1'b0;
    #1;
    check_precharged();
  endtask

  // carry-in held unevaluated: which carries can still be decided
  task automatic add_without_cin(input logic [WIDTH-1:0] av, input logic [WIDTH-1:0] bv,
                                 input logic ci);
    logic [WIDTH:0] known, carry;
    logic [WIDTH:0] ref_sum;
    r = 1'b0;
    drive(av, bv);
    cin = DR_SPACER;
    #1;
    r = 1'b1;
    #1;
    ref_sum = {1'b0, av} + {1'b0, bv} + {{WIDTH{1'b0}}, ci};
    known[0] = 1'b0;
    carry[0] = 1'b0;
    for (int i = 0; i < WIDTH; i++) begin
      if (av[i] == bv[i]) begin
        known[i+1] = 1'b1;
        carry[i+1] = av[i];
      end else begin
        known[i+1] = known[i];
        carry[i+1] = carry[i];
      end
    end
    for (int i = 0; i < WIDTH; i++) begin
      check((s[i].t | s[i].f) == known[i], $sformatf("bit %0d completion without carry-in", i));
      check(comp[i] == known[i], "Comp(i) without carry-in");
      if (known[i]) begin
        check(s[i].t == ref_sum[i] && s[i].f == ~ref_sum[i], "early sum bit value");
        early_bits++;
      end else begin
        waiting_bits++;
      end
    end
    check((cout.t | cout.f) == known[WIDTH], "carry-out completion without carry-in");
    if (known[WIDTH]) check(cout.t == carry[WIDTH], "early carry-out value");
    check(!gco, "gco raised before the carry-in evaluated");
    cin = dr_of(ci);
    #1;
    for (int i = 0; i < WIDTH; i++)
      check(s[i].t == ref_sum[i] && s[i].f == ~ref_sum[i], "sum after carry-in");
    check(gco, "gco after carry-in");
    r = 1'b0;
    #1;
    check_precharged();
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = 1'b0;
    cin = DR_SPACER;
    drive('0, '0);
    #1;
    check_precharged();
    // directed
    add('0, '0, 1'b0);
    add('1, '0, 1'b1);
    add('1, '1, 1'b1);
    add(32'h5555_5555, 32'hAAAA_AAAA, 1'b0);
    add(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    // a carry generated in bit 0 that propagates through L bits
    for (int l = 0; l < WIDTH; l++) begin
      logic [WIDTH-1:0] mask;
      mask = (l == WIDTH - 1) ? '1 : ((WIDTH'(1) << (l + 1)) - 1);
      add(WIDTH'(1), mask, 1'b0);
      add(WIDTH'(0), mask, 1'b1);
    end
    // random
    for (int n = 0; n < 3000; n++)
      add($urandom, $urandom, 1'($urandom));
    // carry-in held back
    add_without_cin(32'h0000_00F0, 32'h0000_000F, 1'b1);
    add_without_cin('1, '0, 1'b1);
    for (int n = 0; n < 300; n++)
      add_without_cin($urandom, $urandom, 1'($urandom));
    check(early_bits > 0, "no bit completed ahead of the carry-in");
    check(waiting_bits > 0, "no bit waited for the carry-in");
    check(bypass_seen > 0, "group bypass never used");
    $display("early-completed bits %0d, bits waiting for carry-in %0d", early_bits, waiting_bits);
    $display("group bypass used %0d times", bypass_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
