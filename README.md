# ADCL expandable 4-bit ALU

An HC181-compatible 4-bit arithmetic logic unit whose gates are built in
adiabatic dynamic CMOS logic (ADCL). An ADCL gate is powered by a sine-wave
supply V_phi instead of a DC rail. It charges and discharges its load
gradually, following that supply, and gives most of the energy back to it.
The silicon this RTL models used roughly a hundredth of the power of a
conventional CMOS HC181 under the same inputs.

For a digital designer, the important fact is how such a gate behaves in time.
**Its output follows the supply and appears half a supply period after its
inputs.** An ADCL network is therefore a pipeline where every gate is a stage,
clocked by the supply. This RTL models it that way:

* `clk_phi` stands for V_phi and has one rising edge per half supply period.
* Every gate is a register that takes its logic function on each edge.

Everything else in the design follows from that timing model.

## Function

The ALU has the HC181 pin functions:

* Operands `a`, `b` (4 bits each).
* Function select `s` (4 bits) and mode `m`: `m = 1` selects logic, `m = 0` arithmetic.
* Carry input `cn`.
* Result `f`.
* Group carry outputs `p_n` and `g_n`.
* Carry output `cn4`.
* `aeqb`, which is high when F = 1111.

Read with active-high data, `cn`, `cn4`, `p_n` and `g_n` are low active. For
example, `cn = 1` means "no carry in".

| S3..S0 | logic, M=1 | arithmetic, M=0, cn=1 (no carry) |
|---|---|---|
| 0000 | ~A | A |
| 0001 | ~(A\|B) | A\|B |
| 0010 | ~A & B | A\|~B |
| 0011 | 0 | minus 1 |
| 0100 | ~(A&B) | A plus (A&~B) |
| 0101 | ~B | (A\|B) plus (A&~B) |
| 0110 | A ^ B | A minus B minus 1 |
| 0111 | A & ~B | (A&~B) minus 1 |
| 1000 | ~A \| B | A plus (A&B) |
| 1001 | ~(A^B) | A plus B |
| 1010 | B | (A\|~B) plus (A&B) |
| 1011 | A & B | (A&B) minus 1 |
| 1100 | 1111 | A plus A |
| 1101 | A \| ~B | (A\|B) plus A |
| 1110 | A \| B | (A\|~B) plus A |
| 1111 | A | A minus 1 |

With `cn = 0`, each arithmetic result is one larger.

The same hardware also serves active-low data. Read A, B and F inverted on the
pins, with the carry now high active, and you get the dual table. For example:

* S=1011, M=1 gives A+B.
* S=1110, M=1 gives AB.
* S=1001, M=0, cn=0 gives A plus B.
* S=0000, M=0, cn=0 gives A minus 1.

## How the network computes

Each bit i forms a propagate and a generate term:

    p_i = A_i | (B_i & S0) | (~B_i & S1)
    g_i = (A_i & ~B_i & S2) | (A_i & B_i & S3)

The table is built so that g ⊆ p. As a result, every arithmetic function is
the plain sum p + g + carry-in. For S=1001, for instance, p = A|B and g = A&B,
and (A|B) + (A&B) = A + B.

The carries into bits 1..3 come from carry lookahead, not from a ripple chain.
Each carry is a two-level sum of products of p, g and the carry in:

    c1 = g0 | p0 c0
    c2 = g1 | p1 g0 | p1 p0 c0
    c3 = g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c0

The result bit is `F_i = (p_i ^ g_i) ^ (M | c_i)`. In logic mode the carry term
is forced to 1, which gives F = ~(p ^ g).

The group outputs are:

* `p_n = ~(p3 p2 p1 p0)`
* `g_n = ~(g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0)`
* `cn4 = ~(G | p3 p2 p1 p0 c0)`

The five-input product in `cn4` is formed by the buffered 5-input NAND gate
described below.

## Path balancing (the hard part)

A gate combines whatever values are present at its inputs on an edge. If one
input came through three stages and another through two, the gate mixes
operands from different supply half-periods. In steady state this is harmless.
As soon as the operands change, the gate gives a wrong result.

ADCL designs avoid this by lengthening the short paths with ADCL inverters.
Two inverters in cascade delay a signal by one supply period without changing
its polarity. `adcl_nand5` is the classic example:

* G1 = NAND(in1, in2) and G2 = NAND(in3, in4).
* G3 = NOR(G1, G2).
* G4 = NAND(G3, in5).
* in5 reaches G4 through a two-inverter buffer, so it arrives on the same edge as G3.

In `adcl_alu4_core`, every gate input is balanced this way, not only this one
gate. Only inverters, 2-input NANDs and 2-input NORs are used. Two
difficulties follow:

* AND, OR and XOR each need an extra inversion stage.
* A path sometimes has to be delayed by an odd number of stages, which a plain
  inverter chain cannot do without flipping polarity.

Both are solved by carrying signals **dual-rail**. A signal is a `dr_t` pair
holding the value and its complement, both produced on the same edge:

* AND is `{NOR(a.f, b.f), NAND(a.t, b.t)}`.
* OR is the mirror of AND.
* NOT swaps the rails and costs no stage.
* A one-stage delay inverts each rail and swaps them.

XOR takes two stages. The 4-input AND and OR trees take two stages each.

The stage chart, counted in `clk_phi` edges after the operands are applied:

| stage | signals |
|---|---|
| 0 | pins, both polarities from the CMOS input interface |
| 1–3 | p_i, g_i |
| 4–5 | lookahead product terms; p ^ g; **p_n** |
| 6–7 | carries c1..c3 (c0 delayed to match); **g_n** |
| 6 | 5-input NAND of p3..p0, c0 |
| 8 | M \| c_i |
| 10 | **f** (all four bits); **cn4** |
| 12 | **aeqb** (4-input AND of the network's F) |

All paths are balanced, so the core accepts a new operand set on every edge.
Each output then shows the matching result after its own latency. The
testbenches rely on this: they change the operands on every edge and check
every output at its latency.

## The output register and CL

The outputs come from the network at different stages. F is therefore not
read from the network directly. It is loaded into an output register on the
rising edge of the strobe `cl`, and the four bits are read there together.

To use the top level `adcl_alu181`:

1. Hold the operands for at least 10 `clk_phi` edges.
2. Pulse `cl`.
3. Read `f`.

In the supply's terms, F is ready 5 supply periods after the operands.
`p_n`, `g_n`, `cn4` and `aeqb` are not registered. They are valid 5, 7, 10
and 12 edges after the operands.

## Expanding to wider words

There are two ways to build wider words:

* **Lookahead.** Feed each slice's `p_n`/`g_n` to an external carry-lookahead
  unit (HC182-type), which returns the carry into each slice.
* **Ripple.** Chain `cn4` of one slice into `cn` of the next.

The external lookahead unit is not part of this design. `tb/cla_lookahead_model.sv`
is a behavioural stand-in. With it, a 16-bit ALU settles 7 + 10 edges after the
operands. A rippled slice adds 10 edges per slice.

## Modules

| file | role |
|---|---|
| `rtl/adcl_alu181.sv` | top: core + output register |
| `rtl/adcl_alu4_core.sv` | the balanced ALU network |
| `rtl/adcl_out_reg.sv` | CL-strobed result register (`WIDTH` = 4) |
| `rtl/adcl_nand5.sv` | buffered 5-input NAND |
| `rtl/adcl_delay_buf.sv` | inverter-pair delay buffer (`PAIRS` = 1) |
| `rtl/adcl_inv.sv`, `adcl_nand2.sv`, `adcl_nor2.sv` | the three ADCL cells |
| `rtl/adcl_dr_*.sv` | dual-rail AND2/OR2/XOR2/AND4/OR4 and delay helpers |
| `rtl/adcl_pkg.sv` | `dr_t`, constants, latencies |

Testbenches (`tb/`), each self-checking and ending with one `TB_RESULT` line:

| file | what it tests |
|---|---|
| `tb_adcl_inv`, `tb_adcl_nand2`, `tb_adcl_nor2` | cell truth tables and the one-edge latency |
| `tb_adcl_delay_buf` | the delay buffer |
| `tb_adcl_nand5` | the 5-input NAND, with new inputs on every edge |
| `tb_adcl_out_reg` | the output register |
| `tb_adcl_alu4_core` | 4000 streamed random operand sets, all outputs at their latencies |
| `tb_adcl_alu181` | end to end; details below |
| `tb_adcl_dynamic_tests` | dynamic tests; details below |
| `tb_adcl_alu_expansion` | 16-bit lookahead and 8-bit ripple words |

`tb_adcl_alu181` covers:

* All 32 functions with both carries.
* The register hold between strobes.
* The active-low reading.
* Streamed operation.

It also counts each mechanism: carry in and out, lookahead carry, G, P, A=B,
hold, active-low and streaming. It fails if any of them never occurs.

`tb_adcl_dynamic_tests` runs the eight scope-style dynamic tests, with square
waves on A0/B0 and CL strobes. Last, it runs the power-estimate condition:
active-low A plus B, B0 at 15 kHz against a 450 kHz supply, i.e. B0 toggles
every 30 edges.

All testbenches use `tb/alu181_ref_pkg.sv`. It is a reference model written
from the function table, as X + Y + carry, and is independent of the p/g
network.

## Simulating

With Verilator 5, for example for the top-level testbench:

    verilator --binary --timing --assert rtl/adcl_pkg.sv tb/alu181_ref_pkg.sv \
        rtl/*.sv tb/cla_lookahead_model.sv tb/tb_adcl_alu181.sv \
        --top-module tb_adcl_alu181 -Mdir obj
    ./obj/Vtb_adcl_alu181

Gates have no reset, like the real cells. A gate's value is arbitrary until
its inputs have passed through once. The testbenches only read outputs after
the latency. Everything runs in seconds.

## How far it follows the original chip, and where it departs

Taken from the original design:

* The HC181 function set in both data polarities.
* Internal carry lookahead with P-bar and G-bar outputs.
* Gates restricted to NOT/NAND2/NOR2 ADCL cells with a half-period delay.
* Inverter-pair delay buffers and the buffered 5-input NAND.
* The output register read with the CL strobe.
* The pin set: A, B, S, M, Cn, F, P, G, A=B, V_phi, CL.

This design's own choices:

* **The gate network.** Only the function is known. The HC181 equations
  mapped onto dual-rail cells are a reconstruction.
* **Full balancing.** The original is only known to balance the 5-input NAND,
  and its F bits left the network at different times. Here every path is
  balanced and the F bits arrive together. The output register is kept anyway.
* **The carry output `cn4`.** It is added for HC181 compatibility. The chip's
  pin drawing shows no carry output.
* **The 5-input NAND.** Here it forms the product term of `cn4`. Where the
  original used it is not known. Its drawing has one more output element after
  G4 whose type is not given. That element is left out, and the output is
  taken at G4 (a NAND, as the gate is named).
* **The output register.** It is an edge-triggered flip-flop on the rising
  edge of CL, with no reset. Only F is registered.
* **`aeqb`.** It is a plain output, not an open-collector one.
* **Input polarities.** The CMOS input interface is assumed to supply each
  input in both polarities.
* **The clock.** `clk_phi` stands for the supply. Nothing in the RTL models
  energy recovery or power. The gate transistors, load capacitors and the
  non-adiabatic I/O buffers are outside the RTL.
* **The NAND and NOR delay.** These cells are given the same half-period delay
  as the inverter.
