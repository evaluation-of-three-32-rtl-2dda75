// dcvs_cla4: multi-output carry look-ahead gate (Manchester-chain style) for
// a group of GROUP bits, with the reduced-propagation bypass.
//
// For k = 1..GROUP, from the bit signals G, N, P of its group and the group's
// dual-rail carry-in C0 it produces
//   C(k)     = G(k) + P(k).C(k-1)      = G(k) + P(k)G(k-1) + ... + P(k)..P(1)C0
//   C-bar(k) = N(k) + P(k).C-bar(k-1)  = N(k) + P(k)N(k-1) + ... + P(k)..P(1)C0-bar
// Both halves share one series chain of propagate transistors. A dynamic AND
// of all propagate signals (output all_p) closes pass transistors that join
// the carry-in directly to the group's last carry; logically that path is the
// term P(GROUP)..P(1).C0, already part of C(GROUP), but it is kept as a term of
// its own because it is what shortens the worst-case path through the chain.
// With r low every output is low. Combinational.
module dcvs_cla4
  import dcvs_pkg::*;
#(
  parameter int unsigned GROUP = 4
) (
  input  logic             r,
  input  logic [GROUP-1:0] g,
  input  logic [GROUP-1:0] n,
  input  logic [GROUP-1:0] p,
  input  dr_t              cin,          // C0 of the group
  output dr_t              cout [GROUP], // cout[k-1] = C(k)
  output logic             all_p         // bypass enable: every P high
);

  dr_t chain [GROUP+1];

  assign chain[0] = cin;

  for (genvar k = 0; k < GROUP; k++) begin : g_bit
    if (k == GROUP - 1) begin : g_last
      // last carry: chain node plus the bypass pass transistors
      assign chain[k+1].t = r & (g[k] | (p[k] & chain[k].t) | (all_p & cin.t));
      assign chain[k+1].f = r & (n[k] | (p[k] & chain[k].f) | (all_p & cin.f));
    end else begin : g_mid
      assign chain[k+1].t = r & (g[k] | (p[k] & chain[k].t));
      assign chain[k+1].f = r & (n[k] | (p[k] & chain[k].f));
    end
    assign cout[k] = chain[k+1];
  end

  assign all_p = r & (&p);

endmodule
