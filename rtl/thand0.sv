// thand0: THand0 NCL gate in the basic-gate QDI architecture of
// qdi_ncl_gate.
//
// Z rises when F_NCL-SET = AB + BC + AD is true, falls only when A, B, C and
// D are all 0, and holds otherwise:
//   Z(t+1) = (AB + BC + AD + Z(t)) . (A + B + C + D)
// The netlist is three 2-input AND gates, a 4-input OR taking the three
// products and Z, a 4-input OR of the inputs and a 2-input output AND, as in
// the published THand0 netlist.
//
// Interface: a, b, c, d in; z out. No clock or reset; the output settles in
// the same time step as the inputs in a zero-delay simulation.
module thand0
  import ncl_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z
);

  qdi_ncl_gate #(
    .N      (THAND0_N),
    .NTERMS (THAND0_NTERMS),
    .TERMS  (THAND0_TERMS)
  ) u_gate (
    .in_i ({d, c, b, a}),
    .z_o  (z)
  );

endmodule
