// adder_chip: the evaluation chip holding the three self-timed adders.
//
// A ripple-carry adder (rc_adder), a carry look-ahead adder of eight 4-bit
// groups (cla_adder) and a binary carry look-ahead adder (bcl_adder), all
// WIDTH bits wide, in dual-rail DCVS logic with a completion circuit each,
// sit side by side and add the same operands.
//
// Operands: a scan_in chain of 2*WIDTH+1 bits holds A (bits WIDTH-1:0), B
// (bits 2*WIDTH-1:WIDTH) and the carry-in C0 (bit 2*WIDTH); its outputs are
// turned into complementary pairs for the adders. Results: a scan_out chain
// shared by the RC and CLA adders captures {CLA carry-out, CLA sum, RC
// carry-out, RC sum} (RC sum in the low bits) and a second one captures {BCL
// carry-out, BCL sum}; both are loaded by so_load and shifted by so_shift.
// Only the true rails are captured.
//
// Each adder has its own precharge/evaluate control (r_rc, r_cla, r_bcl) and
// brings out its global completion signal (gco_*): raise r, wait for gco to
// rise, capture the results, lower r and wait for gco to fall before the next
// addition. The CLA adder's per-group bypass flags are brought out as
// cla_bypass. The distributed buffers that drive R across each adder and the
// pads are electrical parts without logic and are not modelled; the scan
// chains use one clock, clk, which the adders themselves never see.
// The three adders, their 32-bit width and the 4-bit CLA grouping follow the
// published chip; the scan chains' length, order and controls, the separate
// R pin per adder and the cla_bypass observation port are this design's.
module adder_chip
  import dcvs_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             si_shift,
  input  logic             si_data,
  input  logic             r_rc,
  input  logic             r_cla,
  input  logic             r_bcl,
  input  logic             so_load,
  input  logic             so_shift,
  output logic             so_data_rc_cla,
  output logic             so_data_bcl,
  output logic             gco_rc,
  output logic             gco_cla,
  output logic             gco_bcl,
  output logic [WIDTH/4-1:0] cla_bypass
);

  localparam int unsigned NIN = 2 * WIDTH + 1;

  logic [NIN-1:0]   op;
  logic             si_unused;
  dr_t [WIDTH-1:0]  a, b;
  dr_t              cin;

  dr_t [WIDTH-1:0]  s_rc, s_cla, s_bcl;
  dr_t              co_rc, co_cla, co_bcl;
  logic [WIDTH-1:0] comp_rc, comp_cla, comp_bcl;
  logic [WIDTH-1:0] st_rc, st_cla, st_bcl;

  scan_in #(.N(NIN)) u_scan_in (
    .clk(clk), .shift(si_shift), .sdi(si_data), .q(op), .sdo(si_unused)
  );

  for (genvar i = 0; i < WIDTH; i++) begin : g_rails
    assign a[i]     = dr_of(op[i]);
    assign b[i]     = dr_of(op[WIDTH+i]);
    assign st_rc[i]  = s_rc[i].t;
    assign st_cla[i] = s_cla[i].t;
    assign st_bcl[i] = s_bcl[i].t;
  end
  assign cin = dr_of(op[2*WIDTH]);

  rc_adder #(.WIDTH(WIDTH)) u_rc (
    .r(r_rc), .a(a), .b(b), .cin(cin), .s(s_rc), .cout(co_rc),
    .comp(comp_rc), .gco(gco_rc)
  );

  cla_adder #(.WIDTH(WIDTH), .GROUP(4)) u_cla (
    .r(r_cla), .a(a), .b(b), .cin(cin), .s(s_cla), .cout(co_cla),
    .comp(comp_cla), .all_p(cla_bypass), .gco(gco_cla)
  );

  bcl_adder #(.WIDTH(WIDTH)) u_bcl (
    .r(r_bcl), .a(a), .b(b), .cin(cin), .s(s_bcl), .cout(co_bcl),
    .comp(comp_bcl), .gco(gco_bcl)
  );

  scan_out #(.N(2*WIDTH+2)) u_scan_out_rc_cla (
    .clk(clk), .load(so_load), .shift(so_shift),
    .d({co_cla.t, st_cla, co_rc.t, st_rc}), .sdo(so_data_rc_cla)
  );

  scan_out #(.N(WIDTH+1)) u_scan_out_bcl (
    .clk(clk), .load(so_load), .shift(so_shift),
    .d({co_bcl.t, st_bcl}), .sdo(so_data_bcl)
  );

endmodule
