// tb_thand0: self-checking test of the THand0 gate.
//
// The reference is the NCL gate rule written independently of the netlist:
// the output rises when B(A + C) + AD, the factored form of AB + BC + AD, is true, falls when all four inputs are 0,
// and otherwise keeps its previous value. The test runs a directed
// input/output-mode sequence (set, partial release that must hold, full
// release), an exhaustive sweep of all 16 input vectors from both held
// states, DATA/NULL wavefronts in the four-phase style (inputs rise one by
// one, then fall one by one, in random order) and random vectors. Every step
// waits 1 ns for the zero-delay loop to settle, then compares.
`timescale 1ns/1ps
module tb_thand0;

  logic a, b, c, d, z;
  logic ref_z;
  int   checks   = 0;
  int   failures = 0;

  thand0 dut (.a(a), .b(b), .c(c), .d(d), .z(z));

  function automatic logic ref_next(logic [3:0] v, logic prev);
    logic a, b, c, d;
    {d, c, b, a} = v;
    if ((b & (a | c)) | (a & d)) return 1'b1;
    if (v == 4'b0000) return 1'b0;
    return prev;
  endfunction

  task automatic apply(logic [3:0] v);
    {d, c, b, a} = v;
    #1;
    ref_z = ref_next(v, ref_z);
    checks++;
    if (z !== ref_z) begin
      failures++;
      $display("FAIL t=%0t dcba=%b z=%b expected %b", $time, v, z, ref_z);
    end
  endtask

  task automatic expect_z(logic e);
    checks++;
    if (z !== e) begin
      failures++;
      $display("FAIL t=%0t directed step: z=%b expected %b", $time, z, e);
    end
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
    ref_z = 1'b0;
    apply(4'b0000); expect_z(1'b0);
    // Input/output-mode sequence: A and D set, D falls, A alone holds,
    // A falls and Z resets.
    apply(4'b1000); expect_z(1'b0);
    apply(4'b1001); expect_z(1'b1);
    apply(4'b0001); expect_z(1'b1);
    apply(4'b0000); expect_z(1'b0);
    // C and D together never set the gate; A and C neither.
    apply(4'b1100); expect_z(1'b0);
    apply(4'b0000);
    apply(4'b0101); expect_z(1'b0);
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

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
