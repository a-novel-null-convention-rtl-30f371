// th24comp: TH24comp NCL gate in the basic-gate QDI architecture of
// qdi_ncl_gate.
//
// Z rises when F_NCL-SET = AC + AD + BC + BD is true (one of A, B and one of
// C, D), falls only when A, B, C and D are all 0, and holds otherwise:
//   Z(t+1) = (AC + AD + BC + BD + Z(t)) . (A + B + C + D)
// The netlist is four 2-input AND gates, a 5-input OR taking the four products
// and Z, a 4-input OR of the inputs and a 2-input output AND, as in the
// published TH24comp netlist.
//
// Interface: a, b, c, d in; z out. No clock or reset; the output settles in
// the same time step as the inputs in a zero-delay simulation.
module th24comp
  import ncl_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z
);

  qdi_ncl_gate #(
    .N      (TH24COMP_N),
    .NTERMS (TH24COMP_NTERMS),
    .TERMS  (TH24COMP_TERMS)
  ) u_gate (
    .in_i ({d, c, b, a}),
    .z_o  (z)
  );

endmodule
