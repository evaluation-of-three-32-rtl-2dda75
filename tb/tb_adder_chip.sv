// tb_adder_chip: end-to-end test of the evaluation chip at its full 32-bit
// size, using only the chip's pins.
//
// One operation: shift A, B and C0 into the operand chain (65 clocks), raise
// the precharge/evaluate controls, wait for each adder's gco, capture the
// results into the scan-out chains, lower the controls and check that every
// gco falls, then shift both result chains out (66 and 33 clocks) and compare
// the RC, CLA and BCL sums and carry-outs with A + B + C0 computed here.
// Workload: the carry-propagation sweep of the chip's measurements, one
// addition for each carry propagate length 0..32 (a carry generated in bit 0,
// or entering as C0, that must travel L bit positions), then random operands.
// Every tenth operation evaluates the three adders one at a time to check
// that each gco answers only its own control. Counted mechanisms, each of
// which must occur: operand scan-in, result scan-out, a full evaluate /
// precharge handshake on each adder, a CLA group bypass, each propagate
// length of the sweep, and a separately controlled evaluation.
module tb_adder_chip;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned NIN   = 2 * WIDTH + 1;

  logic clk = 1'b0;
  logic si_shift, si_data, r_rc, r_cla, r_bcl, so_load, so_shift;
  logic so_data_rc_cla, so_data_bcl, gco_rc, gco_cla, gco_bcl;
  logic [WIDTH/4-1:0] cla_bypass;

  int unsigned checks = 0, failures = 0, cycles = 0;
  int unsigned n_scan_in = 0, n_scan_out = 0, n_bypass = 0, n_alone = 0;
  int unsigned n_hs_rc = 0, n_hs_cla = 0, n_hs_bcl = 0;
  bit          len_seen [WIDTH+1];

  adder_chip dut (
    .clk(clk), .si_shift(si_shift), .si_data(si_data),
    .r_rc(r_rc), .r_cla(r_cla), .r_bcl(r_bcl),
    .so_load(so_load), .so_shift(so_shift),
    .so_data_rc_cla(so_data_rc_cla), .so_data_bcl(so_data_bcl),
    .gco_rc(gco_rc), .gco_cla(gco_cla), .gco_bcl(gco_bcl),
    .cla_bypass(cla_bypass)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // longest distance a carry travels through propagating bits
  function automatic int unsigned prop_length(input logic [WIDTH-1:0] av,
                                              input logic [WIDTH-1:0] bv, input logic ci);
    int unsigned best = 0, run = 0;
    bit          live = ci;     // a carry of 1 is travelling
    for (int i = 0; i < WIDTH; i++) begin
      if (av[i] ^ bv[i]) begin
        if (live) run++;
      end else begin
        live = av[i] & bv[i];
        run  = 0;
      end
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic operate(input logic [WIDTH-1:0] av, input logic [WIDTH-1:0] bv,
                         input logic ci, input bit one_at_a_time);
    logic [NIN-1:0]    word;
    logic [WIDTH:0]    ref_sum;
    logic [2*WIDTH+1:0] got_rc_cla;
    logic [WIDTH:0]    got_bcl;
    logic              bypass_expected;

    word = {ci, bv, av};
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      si_shift = 1'b1;
      si_data  = word[i];
    end
    @(negedge clk);
    si_shift = 1'b0;
    n_scan_in++;
    check(!gco_rc && !gco_cla && !gco_bcl, "gco low before evaluation");

    if (one_at_a_time) begin
      r_rc = 1'b1;
      #1;
      check(gco_rc && !gco_cla && !gco_bcl, "RC evaluated alone");
      r_rc = 1'b0;
      r_cla = 1'b1;
      #1;
      check(!gco_rc && gco_cla && !gco_bcl, "CLA evaluated alone");
      r_cla = 1'b0;
      r_bcl = 1'b1;
      #1;
      check(!gco_rc && !gco_cla && gco_bcl, "BCL evaluated alone");
      r_bcl = 1'b0;
      #1;
      n_alone++;
    end

    r_rc  = 1'b1;
    r_cla = 1'b1;
    r_bcl = 1'b1;
    wait (gco_rc && gco_cla && gco_bcl);
    bypass_expected = 1'b0;
    for (int k = 0; k < WIDTH / 4; k++)
      bypass_expected |= &(av[4*k +: 4] ^ bv[4*k +: 4]);
    check((cla_bypass != '0) == bypass_expected, "CLA bypass flags");
    if (cla_bypass != '0) n_bypass++;
    @(negedge clk);
    so_load = 1'b1;
    @(negedge clk);
    so_load = 1'b0;
    r_rc  = 1'b0;
    r_cla = 1'b0;
    r_bcl = 1'b0;
    #1;
    check(!gco_rc, "RC gco falls in precharge");
    check(!gco_cla, "CLA gco falls in precharge");
    check(!gco_bcl, "BCL gco falls in precharge");
    n_hs_rc++;
    n_hs_cla++;
    n_hs_bcl++;

    so_shift = 1'b1;
    for (int i = 0; i < 2 * WIDTH + 2; i++) begin
      got_rc_cla[i] = so_data_rc_cla;
      if (i <= WIDTH) got_bcl[i] = so_data_bcl;
      @(negedge clk);
    end
    @(negedge clk);
    so_shift = 1'b0;
    n_scan_out++;

    ref_sum = {1'b0, av} + {1'b0, bv} + {{WIDTH{1'b0}}, ci};
    check(got_rc_cla[WIDTH:0] == ref_sum,
          $sformatf("RC  %h + %h + %0d = %h, got %h", av, bv, ci, ref_sum, got_rc_cla[WIDTH:0]));
    check(got_rc_cla[2*WIDTH+1:WIDTH+1] == ref_sum,
          $sformatf("CLA %h + %h + %0d = %h, got %h", av, bv, ci, ref_sum,
                    got_rc_cla[2*WIDTH+1:WIDTH+1]));
    check(got_bcl == ref_sum,
          $sformatf("BCL %h + %h + %0d = %h, got %h", av, bv, ci, ref_sum, got_bcl));
    len_seen[prop_length(av, bv, ci)] = 1'b1;
  endtask

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n_ops = 0, n_len = 0;
    si_shift = 1'b0;
    si_data  = 1'b0;
    so_load  = 1'b0;
    so_shift = 1'b0;
    r_rc     = 1'b0;
    r_cla    = 1'b0;
    r_bcl    = 1'b0;
    foreach (len_seen[i]) len_seen[i] = 1'b0;
    repeat (2) @(negedge clk);

    // carry propagate length sweep, 0 .. WIDTH
    for (int l = 0; l < WIDTH; l++) begin
      logic [WIDTH-1:0] mask;
      mask = (l == WIDTH - 1) ? '1 : ((WIDTH'(1) << (l + 1)) - 1);
      operate(WIDTH'(1), mask, 1'b0, (n_ops % 10) == 0);
      check(prop_length(WIDTH'(1), mask, 1'b0) == l, "sweep operand length");
      n_ops++;
    end
    operate('0, '1, 1'b1, 1'b0);
    n_ops++;
    // random operands
    for (int n = 0; n < 60; n++) begin
      operate($urandom, $urandom, 1'($urandom), (n_ops % 10) == 0);
      n_ops++;
    end

    foreach (len_seen[i]) begin
      check(len_seen[i], $sformatf("carry propagate length %0d not exercised", i));
      if (len_seen[i]) n_len++;
    end
    check(n_scan_in > 0 && n_scan_out > 0, "scan chains used");
    check(n_hs_rc > 0 && n_hs_cla > 0 && n_hs_bcl > 0, "handshakes");
    check(n_bypass > 0, "CLA bypass never used");
    check(n_alone > 0, "separate controls never used");
    $display("operations %0d: scan-in %0d, scan-out %0d, handshakes RC %0d CLA %0d BCL %0d",
             n_ops, n_scan_in, n_scan_out, n_hs_rc, n_hs_cla, n_hs_bcl);
    $display("CLA bypass used in %0d operations, separate evaluations %0d, propagate lengths covered %0d",
             n_bypass, n_alone, n_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
