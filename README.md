# QDI NULL Convention Logic gates from basic AND/OR gates

NULL Convention Logic (NCL) builds clockless circuits out of *threshold gates
with hysteresis*. A THmn gate has n inputs. Its output rises when its set
function becomes true (for a plain THmn gate: at least m inputs are 1). It falls
only when **all** n inputs are back at 0. In every other input state it keeps
its value. With this rule, a wave of DATA and then a wave of NULL (all zeros)
can pass through a network of gates without glitches, whatever the gate delays.
This is the four-phase, quasi-delay-insensitive (QDI) style.

NCL gates are normally custom transistor-level cells. This RTL builds them from
plain AND and OR gates instead, so they can go onto an FPGA or a standard-cell
library. The hard part is keeping the QDI property. A gate built from basic
gates must stay correct when its inputs change while it is still settling
(input/output mode). Many basic-gate versions only work if nothing changes
until the gate has settled (fundamental mode). This design uses a structure
that works in input/output mode.

## The architecture

Every gate has the same four-stage structure:

```
             +--------+
 inputs ---->| AND 1  |--+      (one AND per product term of F_SET)
             +--------+  |   +-------+
                ...      +-->|       |
             +--------+      | OR 2  |----+    +-------+
 inputs ---->| AND 1  |----->|       |    +--->|       |
             +--------+  +-->+-------+         | AND 4 |---+---> Z
                         |                +--->|       |   |
                         |  +-------+     |    +-------+   |
 all inputs ------------>|  | OR 3  |-----+                |
                         |  +-------+                      |
                         +---------------------------------+  (Z fed back)
```

    Z(t+1) = (F_SET + Z(t)) . (in_1 + in_2 + ... + in_n)

The stages work as follows:

- **AND 1:** one AND gate per product term of the set function F_SET.
- **OR 2 (the hysteresis condition):** ORs all the products together with the
  output Z, which is fed back.
- **OR 3:** ORs all the inputs. Its output is the complement of the reset
  condition "all inputs are 0".
- **AND 4:** ANDs OR 2 with OR 3 to give Z.

Two properties make the gate QDI:

- **Hold.** Once Z is 1, OR 2 stays at 1 through the feedback. The inputs that
  made F_SET true can fall in any order without affecting Z.
- **Release.** Z falls only through OR 3, so only after the last input has
  fallen. No path races another, so no gate delay can cause a glitch.

Take TH23 as an example:

1. A and B rise while C = 0. AND 1 (AB) fires, OR 2 rises, OR 3 is already up,
   and Z rises.
2. A falls. AB drops, but OR 2 is held by Z, so Z stays at 1.
3. B falls. OR 3 drops, so Z drops.

Two earlier basic-gate structures act as references here but are not
implemented:

- a Huffman next-state machine, `Z+ = F + (A+B+C)Z`;
- an RS-latch form with separate set and reset functions.

Both only meet timing if certain path-delay inequalities hold. That makes them
fundamental-mode circuits, not QDI.

## The gate library

| gate     | set function F_SET    | reset           | module        |
|----------|-----------------------|-----------------|---------------|
| TH23     | AB + BC + AC          | A=B=C=0         | `th23`        |
| THand0   | AB + BC + AD          | A=B=C=D=0       | `thand0`      |
| TH24comp | AC + AD + BC + BD     | A=B=C=D=0       | `th24comp`    |

TH23 is the 2-of-3 threshold gate. TH24comp is (A+B)(C+D): it fires when one
input from each pair is present.

## Files

| file                      | contents |
|---------------------------|----------|
| `rtl/ncl_pkg.sv`          | The product-term tables of the three gates. |
| `rtl/qdi_ncl_gate.sv`     | The generic gate, with parameters `N` (inputs), `NTERMS` and `TERMS`. Each entry of `TERMS` is a bit mask over the inputs, and bit i selects input i for that AND gate. The default is TH23. |
| `rtl/th23.sv`, `rtl/thand0.sv`, `rtl/th24comp.sv` | The three gates, with pins `a, b, c[, d]` and `z`. |
| `rtl/ncl_gates_top.sv`    | The three gates side by side, each with its own input vector (`{C,B,A}` or `{D,C,B,A}`) and output. They are independent library cells, so nothing connects them. |
| `tb/tb_*.sv`              | One self-checking testbench per module. |

To add a gate, instantiate `qdi_ncl_gate` with your own masks. For example,
TH34 has `N=4`, `NTERMS=4` and
`TERMS='{4'b1110,4'b1101,4'b1011,4'b0111}` (all products of three inputs).
`tb_qdi_ncl_gate` tests that gate and a TH44 besides the default TH23.

## Timing and reset

- **No clock.** The gates have no clock.
- **Settling.** In simulation all gates have zero delay, so an output settles
  in the same time step as the change on its inputs.
- **No reset pin.** The gate is cleared the NCL way: drive every input to 0 and
  Z goes to 0, whatever its earlier value. Start a circuit of these gates in
  the NULL state.

## Simulating

Each testbench reads the package first and finds the modules on the search
path:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv rtl/ncl_pkg.sv \
          tb/tb_ncl_gates_top.sv --top-module tb_ncl_gates_top -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`. Each checks the gate
against a reference of the NCL rule (set function, then all-zero, then hold),
written without the netlist. The tests run these input sequences:

- the input/output-mode sequence above: set, then a partial release that must
  hold, then a full release;
- every input vector from both held states;
- random DATA/NULL wavefronts, where inputs rise one at a time and then fall
  one at a time, in random order;
- random vectors.

The top-level test drives all three gates at once. For each gate it counts
how often four behaviours happen: set, hold at 1 through the feedback, hold
at 0 below threshold, and reset. A behaviour that never happens counts as a
failure.

## What to expect from tools

- **Loop warnings.** Lint and synthesis report a combinational loop through
  OR 2 and AND 4 (Verilator: `UNOPTFLAT`). That loop is the gate's memory and
  is intended. Verilator settles it correctly, because the loop has a single
  feedback path and is stable in both states.
- **Synthesis.** Keep the loop intact: do not retime it, and do not let the
  tool replace it with a latch if your flow must stay QDI.
- **FPGA LUT count.** Each gate is one Boolean function of its inputs and Z.
  TH23 has four signals (A, B, C, Z) and fits in one 4-input LUT. THand0 and
  TH24comp have five, which needs two 4-input LUTs when split on one variable.
  A generic mapping (yosys `synth -lut 4`) gives 1, 3 and 3 LUTs. The
  published FPGA results for this architecture are 1, 2 and 2.

## Limits and departures

- **No delays.** The RTL is zero-delay. QDI means correct under any gate
  delays, and a zero-delay simulation cannot show that. What it shows is the
  state behaviour that makes the circuit QDI: hold through the feedback, and
  release only on all-zero. Published latencies on a Cyclone III FPGA are
  about 4 to 5 ns per gate (TH23 5.12 ns, THand0 4.37 ns, TH24comp 4.12 ns).
  They depend on the device and placement and are not modelled here.
- **The reset term.** The reset condition is "all inputs 0". In the equations
  it appears complemented, as the OR of the inputs, and that is how it is
  built.
- **This design's own choices.** The term-mask encoding, the input bit order
  and the bundling of pins in the top level are specific to this RTL. So is
  the absence of a reset pin.
- **Input code not checked.** Nothing checks that the inputs follow a valid
  dual-rail or m-of-n code. A gate behaves as described for any input
  sequence. Code validity is a property of the circuit the gates are used in.
