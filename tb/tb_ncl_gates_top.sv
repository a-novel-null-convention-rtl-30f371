// tb_ncl_gates_top: end-to-end test of the three-gate NCL library at its
// default configuration.
//
// All three gates are driven at once, each with its own stream of inputs:
// first the input/output-mode sequence of each gate (set, partial release that
// must hold, full release), then DATA/NULL wavefronts in the four-phase style
// (inputs rise one at a time, then fall one at a time, in random order), then
// random vectors. Each output is compared with a reference written as the
// gate's truth rule: set function true -> 1, all inputs 0 -> 0, else hold.
//
// For each gate the test counts the four behaviours of the architecture and
// counts a failure if one never happened:
//   set       output rises because the set function became true
//   hold-high output stays 1 with the set function false and an input still 1
//             (the hysteresis feedback doing its work)
//   hold-low  output stays 0 with an input at 1 but the set function false
//   reset     output falls because all inputs reached 0
`timescale 1ns/1ps
module tb_ncl_gates_top;

  logic [2:0] th23_i;
  logic [3:0] thand0_i, th24comp_i;
  logic       th23_z, thand0_z, th24comp_z;

  int checks   = 0;
  int failures = 0;

  typedef enum int {EV_SET, EV_HOLD_HIGH, EV_HOLD_LOW, EV_RESET} ev_e;
  int events [3][4];
  string gname [3] = '{"TH23", "THand0", "TH24comp"};
  logic  ref_z [3];

  ncl_gates_top dut (
    .th23_i     (th23_i),
    .th23_z     (th23_z),
    .thand0_i   (thand0_i),
    .thand0_z   (thand0_z),
    .th24comp_i (th24comp_i),
    .th24comp_z (th24comp_z)
  );

  // Set functions, inputs {D, C, B, A}.
  function automatic logic fset(int g, logic [3:0] v);
    logic a, b, c, d;
    {d, c, b, a} = v;
    case (g)
      0:       return $countones(v[2:0]) >= 2;                      // TH23
      1:       return (a && b) || (b && c) || (a && d);             // THand0
      default: return (a || b) && (c || d);                         // TH24comp
    endcase
  endfunction

  task automatic step(logic [2:0] v23, logic [3:0] vand0, logic [3:0] v24);
    logic [3:0] v [3];
    logic       got [3];
    v[0] = {1'b0, v23}; v[1] = vand0; v[2] = v24;
    th23_i = v23; thand0_i = vand0; th24comp_i = v24;
    #1;
    got[0] = th23_z; got[1] = thand0_z; got[2] = th24comp_z;
    for (int g = 0; g < 3; g++) begin
      logic prev = ref_z[g];
      logic f    = fset(g, v[g]);
      if (f)              ref_z[g] = 1'b1;
      else if (v[g] == 0) ref_z[g] = 1'b0;
      if (!prev && ref_z[g])                  events[g][EV_SET]++;
      if (prev && ref_z[g] && !f)             events[g][EV_HOLD_HIGH]++;
      if (!prev && !ref_z[g] && v[g] != 0)    events[g][EV_HOLD_LOW]++;
      if (prev && !ref_z[g])                  events[g][EV_RESET]++;
      checks++;
      if (got[g] !== ref_z[g]) begin
        failures++;
        $display("FAIL t=%0t %s in=%b z=%b expected %b", $time, gname[g], v[g], got[g], ref_z[g]);
      end
    end
  endtask

  // One four-phase cycle per gate: independent random DATA sets, raised bit
  // by bit, then lowered bit by bit, the three gates interleaved.
  task automatic wavefront();
    logic [3:0] data [3];
    logic [3:0] cur  [3];
    int         w    [3];
    data[0] = 4'($urandom_range(7, 1));
    data[1] = 4'($urandom_range(15, 1));
    data[2] = 4'($urandom_range(15, 1));
    for (int g = 0; g < 3; g++) cur[g] = '0;
    // Rising phase.
    while (cur[0] != data[0] || cur[1] != data[1] || cur[2] != data[2]) begin
      for (int g = 0; g < 3; g++) begin
        w[g] = $urandom_range(3, 0);
        if (data[g][w[g]]) cur[g][w[g]] = 1'b1;
      end
      step(cur[0][2:0], cur[1], cur[2]);
    end
    // Falling phase.
    while (cur[0] != 0 || cur[1] != 0 || cur[2] != 0) begin
      for (int g = 0; g < 3; g++) begin
        w[g] = $urandom_range(3, 0);
        cur[g][w[g]] = 1'b0;
      end
      step(cur[0][2:0], cur[1], cur[2]);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 3; g++) begin
      ref_z[g] = 1'b0;
      for (int e = 0; e < 4; e++) events[g][e] = 0;
    end
    step('0, '0, '0);

    // Input/output-mode sequences: the input that completed the set falls
    // first, the output must hold until the last input is released.
    step(3'b001, 4'b1000, 4'b0001);
    step(3'b011, 4'b1001, 4'b0101);
    step(3'b010, 4'b0001, 4'b0100);
    step(3'b000, 4'b0000, 4'b0000);

    repeat (300) wavefront();
    repeat (1000) step(3'($urandom_range(7, 0)), 4'($urandom_range(15, 0)),
                       4'($urandom_range(15, 0)));
    step('0, '0, '0);

    for (int g = 0; g < 3; g++) begin
      $display("%-8s set=%0d hold_high=%0d hold_low=%0d reset=%0d", gname[g],
               events[g][EV_SET], events[g][EV_HOLD_HIGH],
               events[g][EV_HOLD_LOW], events[g][EV_RESET]);
      for (int e = 0; e < 4; e++) begin
        checks++;
        if (events[g][e] == 0) begin
          failures++;
          $display("FAIL %s: behaviour %0d never happened", gname[g], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
