// qdi_ncl_gate: an NCL threshold gate with hysteresis made only of basic
// AND/OR gates, working in input/output mode (quasi delay insensitive).
//
// Behaviour: the output Z goes to 1 when the gate's set function F_NCL-SET is
// true, goes to 0 only when every input is 0, and otherwise keeps its value.
// This is the usual NCL gate rule: set on the threshold, reset on all-NULL,
// hold in between.
//
// Structure, one gate per stage, named as in the TH23 netlist:
//   and1 : one AND gate per product term of F_NCL-SET (mask in TERMS)
//   or2  : OR of all product terms and of Z fed back  (hysteresis condition)
//   or3  : OR of all inputs                           (complemented reset)
//   and4 : Z = or2 AND or3
// so that Z(t+1) = (F_NCL-SET + Z(t)) . (in[0] + ... + in[N-1]).
//
// Why it is QDI: once Z is 1, or2 is held at 1 by the feedback, so the falling
// of the inputs that made F_NCL-SET true cannot drop Z; Z falls only through
// or3, i.e. once the last input has fallen. There is no race between the set
// and reset paths that a gate delay could win.
//
// The loop through or2 and and4 is the state-holding element of the gate and
// is intended: tools report it as a combinational loop. It is stable in both
// states and needs no reset: with all inputs 0, and4 forces Z to 0.
//
// Interface: in_i (N inputs), z_o (output). No clock, no reset. In a
// zero-delay simulation Z settles in the same time step as its inputs.
//
// TERMS defaults to TH23 (AB + BC + AC). The architecture, the equation and
// the gate naming follow the published design; the term-mask parameter is this
// design's own way of making one module serve every gate.
module qdi_ncl_gate
  import ncl_pkg::*;
#(
  parameter int unsigned N      = TH23_N,
  parameter int unsigned NTERMS = TH23_NTERMS,
  parameter logic [NTERMS-1:0][N-1:0] TERMS = TH23_TERMS
) (
  input  logic [N-1:0] in_i,
  output logic         z_o
);

  // An empty product term would be constant 1 and the gate would never reset.
  for (genvar t = 0; t < NTERMS; t++) begin : g_check
    if (TERMS[t] == '0) begin : g_bad
      $error("qdi_ncl_gate: product term %0d has no inputs", t);
    end
  end

  logic [NTERMS-1:0] and1;   // product terms of F_NCL-SET
  logic              or2;    // hysteresis condition
  logic              or3;    // complemented reset condition
  logic              and4;   // gate output

  // and1: each product is the AND of the inputs its mask selects.
  for (genvar t = 0; t < NTERMS; t++) begin : g_and1
    assign and1[t] = &(in_i | ~TERMS[t]);
  end

  assign or2  = (|and1) | and4;
  assign or3  = |in_i;
  assign and4 = or2 & or3;
  assign z_o  = and4;

endmodule
