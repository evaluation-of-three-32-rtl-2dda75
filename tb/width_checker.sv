// width_checker: drives the RC, CLA and BCL adders built at width W, plus the
// RC adder in its GP-block form (COMPACT = 0), with the same operands and checks all three against W-bit integer addition. Each
// addition is one precharge/evaluate cycle: outputs and gco low with r low,
// correct sum and carry rails, every Comp(i) and gco high with r high. Runs
// directed carry chains of every length and random operands, then raises
// done. Used by tb_adder_widths.
module width_checker
  import dcvs_pkg::*;
#(
  parameter int unsigned W = 8
) (
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);

  logic        r;
  dr_t [W-1:0] a, b, s_rc, s_gp, s_cla, s_bcl;
  dr_t         cin, co_rc, co_gp, co_cla, co_bcl;
  logic [W-1:0] comp_rc, comp_gp, comp_cla, comp_bcl;
  logic [W/4-1:0] all_p;
  logic        gco_rc, gco_gp, gco_cla, gco_bcl;

  rc_adder  #(.WIDTH(W)) u_rc  (.r(r), .a(a), .b(b), .cin(cin), .s(s_rc),  .cout(co_rc),
                                .comp(comp_rc),  .gco(gco_rc));
  rc_adder  #(.WIDTH(W), .COMPACT(1'b0)) u_gp (.r(r), .a(a), .b(b), .cin(cin), .s(s_gp),
                                .cout(co_gp), .comp(comp_gp), .gco(gco_gp));
  cla_adder #(.WIDTH(W)) u_cla (.r(r), .a(a), .b(b), .cin(cin), .s(s_cla), .cout(co_cla),
                                .comp(comp_cla), .all_p(all_p), .gco(gco_cla));
  bcl_adder #(.WIDTH(W)) u_bcl (.r(r), .a(a), .b(b), .cin(cin), .s(s_bcl), .cout(co_bcl),
                                .comp(comp_bcl), .gco(gco_bcl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL W=%0d %s", W, what);
    end
  endtask

  function automatic logic [W:0] rails_to_int(input dr_t [W-1:0] s, input dr_t co);
    logic [W:0] v;
    for (int i = 0; i < W; i++) v[i] = s[i].t & ~s[i].f;
    v[W] = co.t & ~co.f;
    return v;
  endfunction

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v = {v, $urandom};
    return v;
  endfunction

  task automatic add(input logic [W-1:0] av, input logic [W-1:0] bv, input logic ci);
    logic [W:0] ref_sum;
    r = 1'b0;
    for (int i = 0; i < W; i++) begin
      a[i] = dr_of(av[i]);
      b[i] = dr_of(bv[i]);
    end
    cin = dr_of(ci);
    #1;
    check(!gco_gp && comp_gp == '0, "RC (GP form) precharge");
    check(!gco_rc && !gco_cla && !gco_bcl, "gco low in precharge");
    check(comp_rc == '0 && comp_cla == '0 && comp_bcl == '0, "Comp low in precharge");
    r = 1'b1;
    #1;
    ref_sum = {1'b0, av} + {1'b0, bv} + {{W{1'b0}}, ci};
    check(rails_to_int(s_rc, co_rc) == ref_sum, "RC sum");
    check(rails_to_int(s_gp, co_gp) == ref_sum, "RC (GP form) sum");
    check(rails_to_int(s_cla, co_cla) == ref_sum, "CLA sum");
    check(rails_to_int(s_bcl, co_bcl) == ref_sum, "BCL sum");
    check(comp_gp == '1 && gco_gp, "RC (GP form) completion");
    check(comp_rc == '1 && comp_cla == '1 && comp_bcl == '1, "Comp high");
    check(gco_rc && gco_cla && gco_bcl, "gco high");
    r = 1'b0;
    #1;
  endtask

  initial begin
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    r        = 1'b0;
    for (int l = 0; l < W; l++) begin
      logic [W-1:0] mask;
      mask = '0;
      for (int i = 0; i <= l; i++) mask[i] = 1'b1;
      add(W'(1), mask, 1'b0);
    end
    add('0, '1, 1'b1);
    for (int n = 0; n < 1000; n++) add(rnd(), rnd(), 1'($urandom));
    done = 1'b1;
  end

endmodule
