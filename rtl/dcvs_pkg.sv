// dcvs_pkg: shared types for the dual-rail (DCVS) adders.
//
// Every DCVS gate drives a pair of complementary outputs (F, F-bar). While the
// control signal R is low the gate precharges and both outputs are low (the
// "spacer"); when R is high exactly one of them rises once the inputs decide
// the result. The struct dr_t carries such a pair: t is the true rail, f the
// complement rail. {t,f} = 2'b00 means "not yet evaluated", 2'b10 a logic 1,
// 2'b01 a logic 0; 2'b11 never occurs in a working circuit.
package dcvs_pkg;

  typedef struct packed {
    logic t;  // true rail (F)
    logic f;  // complement rail (F-bar)
  } dr_t;

  localparam dr_t DR_SPACER = '{t: 1'b0, f: 1'b0};

  // Dual-rail encoding of a settled binary value.
  function automatic dr_t dr_of(input logic v);
    return '{t: v, f: ~v};
  endfunction

  // A pair has evaluated when one of its rails is high; in the circuit this
  // is the NAND of the two precharged internal nodes.
  function automatic logic dr_valid(input dr_t d);
    return d.t | d.f;
  endfunction

endpackage
