// ncl_gates_top: the NCL gate library built in the basic-gate QDI
// architecture -- TH23, THand0 and TH24comp -- placed side by side.
//
// The three gates are independent cells, not one circuit, so each keeps its
// own input and output pins here:
//   th23_i[2:0]     = {C, B, A} of TH23,     th23_z     its output
//   thand0_i[3:0]   = {D, C, B, A} of THand0, thand0_z   its output
//   th24comp_i[3:0] = {D, C, B, A} of TH24comp, th24comp_z its output
// Every gate sets on its threshold function, resets when all its inputs are
// 0 and holds otherwise. No clock or reset; outputs settle in the same time
// step as inputs in a zero-delay simulation. The choice of three gates follows
// the published library; bundling each gate's inputs into one vector is this
// design's own.
module ncl_gates_top (
  input  logic [2:0] th23_i,
  output logic       th23_z,
  input  logic [3:0] thand0_i,
  output logic       thand0_z,
  input  logic [3:0] th24comp_i,
  output logic       th24comp_z
);

  th23 u_th23 (
    .a (th23_i[0]),
    .b (th23_i[1]),
    .c (th23_i[2]),
    .z (th23_z)
  );

  thand0 u_thand0 (
    .a (thand0_i[0]),
    .b (thand0_i[1]),
    .c (thand0_i[2]),
    .d (thand0_i[3]),
    .z (thand0_z)
  );

  th24comp u_th24comp (
    .a (th24comp_i[0]),
    .b (th24comp_i[1]),
    .c (th24comp_i[2]),
    .d (th24comp_i[3]),
    .z (th24comp_z)
  );

endmodule
