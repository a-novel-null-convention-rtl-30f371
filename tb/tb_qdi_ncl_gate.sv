// tb_qdi_ncl_gate: self-checking test of the generic basic-gate NCL gate.
//
// Three instances are checked against an m-of-n threshold reference with
// hysteresis (output rises when at least M inputs are 1, falls when all are
// 0, holds otherwise), computed here with a population count:
//   u_th23 : default parameters, the TH23 gate (M = 2, N = 3)
//   u_th34 : N = 4 with the four 3-input products, a TH34 gate (M = 3)
//   u_th44 : N = 4 with the single 4-input product, a TH44 gate (M = 4)
// The products of the overridden instances are generated from M and N, so the
// test also covers other widths and term counts than the default. Each step
// drives all three with related input vectors, waits 1 ns and compares.
`timescale 1ns/1ps
module tb_qdi_ncl_gate;

  // All 3-input products of 4 inputs: every mask with exactly three ones.
  localparam logic [3:0][3:0] TH34_TERMS = '{4'b1110, 4'b1101, 4'b1011, 4'b0111};
  localparam logic [0:0][3:0] TH44_TERMS = '{4'b1111};

  logic [2:0] in3;
  logic [3:0] in4;
  logic       z23, z34, z44;
  logic       r23, r34, r44;
  int         checks   = 0;
  int         failures = 0;
  int         sets     = 0;
  int         holds    = 0;

  qdi_ncl_gate u_th23 (.in_i(in3), .z_o(z23));
  qdi_ncl_gate #(.N(4), .NTERMS(4), .TERMS(TH34_TERMS)) u_th34 (.in_i(in4), .z_o(z34));
  qdi_ncl_gate #(.N(4), .NTERMS(1), .TERMS(TH44_TERMS)) u_th44 (.in_i(in4), .z_o(z44));

  function automatic logic thr(int ones, int m, logic prev);
    if (ones >= m) return 1'b1;
    if (ones == 0) return 1'b0;
    return prev;
  endfunction

  task automatic cmp(string name, logic got, logic exp_z);
    checks++;
    if (got !== exp_z) begin
      failures++;
      $display("FAIL t=%0t %s z=%b expected %b (in3=%b in4=%b)", $time, name, got, exp_z, in3, in4);
    end
  endtask

  task automatic apply(logic [3:0] v);
    logic p23 = r23;
    in4 = v;
    in3 = v[2:0];
    #1;
    r23 = thr($countones(v[2:0]), 2, r23);
    r34 = thr($countones(v), 3, r34);
    r44 = thr($countones(v), 4, r44);
    if (!p23 && r23) sets++;
    if (p23 && r23 && $countones(v[2:0]) < 2) holds++;
    cmp("th23", z23, r23);
    cmp("th34", z34, r34);
    cmp("th44", z44, r44);
  endtask

  task automatic wavefront(logic [3:0] data);
    logic [3:0] cur  = '0;
    logic [3:0] todo = data;
    while (todo != 0) begin
      int k = $urandom_range(3, 0);
      if (todo[k]) begin
        todo[k] = 1'b0;
        cur[k]  = 1'b1;
        apply(cur);
      end
    end
    while (cur != 0) begin
      int k = $urandom_range(3, 0);
      if (cur[k]) begin
        cur[k] = 1'b0;
        apply(cur);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r23 = 1'b0; r34 = 1'b0; r44 = 1'b0;
    apply(4'b0000);
    for (int s = 0; s < 2; s++) begin
      for (int v = 0; v < 16; v++) begin
        apply(4'b0000);
        if (s == 1) apply(4'b1111);
        apply(v[3:0]);
      end
    end
    repeat (200) wavefront(4'($urandom_range(15, 0)));
    repeat (500) apply(4'($urandom_range(15, 0)));

    // The TH23 instance must have been both set and held by hysteresis.
    checks++;
    if (sets == 0 || holds == 0) begin
      failures++;
      $display("FAIL sets=%0d holds=%0d", sets, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
