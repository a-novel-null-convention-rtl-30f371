// tb_th23: self-checking test of the TH23 gate.
//
// The reference is the NCL gate rule written independently of the netlist:
// the output rises when at least two inputs are 1 (a population count), falls
// when all inputs are 0, and otherwise keeps its previous value. The test
// runs: (1) the input/output-mode sequence that shows the gate is QDI -- A and
// B rise with C = 0, then A falls while B holds Z at 1, then B falls and Z
// drops; (2) DATA/NULL wavefronts in the four-phase style, inputs rising one
// by one and falling one by one in random order; (3) random input vectors.
// Every step waits 1 ns for the zero-delay loop to settle, then compares.
`timescale 1ns/1ps
module tb_th23;

  logic a, b, c, z;
  logic ref_z;
  int   checks   = 0;
  int   failures = 0;

  th23 dut (.a(a), .b(b), .c(c), .z(z));

  // Reference model of a 2-of-3 threshold gate with hysteresis.
  function automatic logic ref_next(logic [2:0] v, logic prev);
    int ones = $countones(v);
    if (ones >= 2) return 1'b1;
    if (ones == 0) return 1'b0;
    return prev;
  endfunction

  task automatic apply(logic [2:0] v);
    {c, b, a} = v;
    #1;
    ref_z = ref_next(v, ref_z);
    checks++;
    if (z !== ref_z) begin
      failures++;
      $display("FAIL t=%0t cba=%b z=%b expected %b", $time, v, z, ref_z);
    end
  endtask

  // Raise the given set of inputs one at a time in a random order, then
  // lower them one at a time in another random order.
  task automatic wavefront(logic [2:0] data);
    logic [2:0] cur = '0;
    logic [2:0] todo = data;
    while (todo != 0) begin
      int k = $urandom_range(2, 0);
      if (todo[k]) begin
        todo[k] = 1'b0;
        cur[k]  = 1'b1;
        apply(cur);
      end
    end
    while (cur != 0) begin
      int k = $urandom_range(2, 0);
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
    apply(3'b000);
    if (z !== 1'b0) begin failures++; $display("FAIL not NULL after all-zero"); end

    // Input/output-mode sequence.
    apply(3'b001);                 // A rises: below threshold
    if (z !== 1'b0) begin failures++; $display("FAIL set early"); end
    apply(3'b011);                 // B rises: AB -> Z = 1
    if (z !== 1'b1) begin failures++; $display("FAIL no set on AB"); end
    apply(3'b010);                 // A falls: B alone holds Z
    if (z !== 1'b1) begin failures++; $display("FAIL hysteresis lost"); end
    apply(3'b000);                 // B falls: Z = 0
    if (z !== 1'b0) begin failures++; $display("FAIL no reset"); end
    checks += 5;

    // Exhaustive: from each held state, every input vector.
    for (int s = 0; s < 2; s++) begin
      for (int v = 0; v < 8; v++) begin
        apply(3'b000);
        if (s == 1) apply(3'b111);
        apply(v[2:0]);
      end
    end

    // Four-phase DATA/NULL wavefronts.
    repeat (200) wavefront(3'($urandom_range(7, 0)));

    // Random vectors.
    repeat (500) apply(3'($urandom_range(7, 0)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
