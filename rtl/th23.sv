// th23: TH23 NCL threshold gate (2-of-3 with hysteresis) in the basic-gate
// QDI architecture of qdi_ncl_gate.
//
// Z rises when at least two of A, B, C are 1 (F_NCL-SET = AB + BC + AC),
// falls only when A, B and C are all 0, and holds its value otherwise:
//   Z(t+1) = (AB + BC + AC + Z(t)) . (A + B + C)
// The netlist is three 2-input AND gates, a 4-input OR taking the three
// products and Z, a 3-input OR of the inputs and a 2-input output AND, as in
// the published TH23 netlist.
//
// Interface: a, b, c in; z out. No clock or reset; the output settles in the
// same time step as the inputs in a zero-delay simulation.
module th23
  import ncl_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  output logic z
);

  qdi_ncl_gate #(
    .N      (TH23_N),
    .NTERMS (TH23_NTERMS),
    .TERMS  (TH23_TERMS)
  ) u_gate (
    .in_i ({c, b, a}),
    .z_o  (z)
  );

endmodule
