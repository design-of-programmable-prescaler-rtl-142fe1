# Programmable divide-by-64..79 prescaler

A PLL frequency synthesizer needs a divider in its feedback loop that runs at
the full VCO frequency and whose ratio can be stepped one unit at a time. This
design gets there with one small fast block and one slow cheap one. A
divide-by-4/5 *dual modulus prescaler* runs at the input clock. A 4-stage
asynchronous *ripple counter* divides its output by 16. A combinational
*modulus control* block chooses, for each of the 16 prescaler cycles that make
up an output period, whether that cycle is 4 or 5 input clocks long. With a
4-bit program word `d`:

    output period = 16 x 4 + d = 64 + d input clocks      (d = 0 .. 15)

Only the three flip-flops of the 4/5 prescaler see the input clock. Each ripple
stage runs at half the rate of the one before it. That keeps the clock load and
the power low.

The circuit was first designed at transistor level with true single-phase
clock (TSPC) flip-flops: 45 nm CMOS, 1.1 V, 20 GHz input. This RTL describes
the same logic structure at register-transfer level. Speed and power
belong to the transistor design and have no counterpart here.

## Block structure

```
           +---------------------+   f4    +-----------------------------+
  clk ---->| dmp45               |-------->| ripple_div16                |
           | DFF1..DFF3, NAND1/2 |         | DFF4 -> DFF5 -> DFF6 -> DFF7|--> out (F64)
           +---------------------+         +-----------------------------+
                     ^ mc                      | fdiv = {F64,F32,F16,F8}
                     |                         v
                     |                 +----------------+
                     +-----------------| mc_control     |<-- d[3:0]
                                       | A0..A3, D, OR  |
                                       +----------------+
```

| module           | role |
|------------------|------|
| `tspc_dff`       | rising-edge D flip-flop with Q, Q-bar and asynchronous clear; the cell used for all seven stages |
| `dmp45`          | synchronous divide-by-4/5 dual modulus prescaler |
| `ripple_div16`   | asynchronous divide-by-2^STAGES counter (default 16) |
| `mc_control`     | decodes the counter state and the program word into the modulus control `mc` |
| `prog_prescaler` | top level: the three blocks wired together |

## The 4/5 prescaler

Three flip-flops share the input clock:

    DFF1.D = NAND1(DFF3.Q, DFF2.Q)     DFF2.D = DFF1.Q = f4
    DFF3.D = NAND2(mc, DFF2.Q-bar)

* `mc = 0`: NAND2 outputs a constant 1, so DFF3 holds 1. NAND1 then inverts
  DFF2. DFF1 and DFF2 form a two-stage twisted ring. The states (DFF1 DFF2)
  run `10 11 01 00`, and `f4` is high for 2 clocks in 4.
* `mc = 1`: NAND2 inverts DFF2.Q-bar, so DFF3 is DFF2 delayed by one clock.
  When DFF2 has just risen, DFF3 is still 0. DFF1 then stays high one clock
  longer. The states (DFF1 DFF2 DFF3) run `100 110 111 011 001`, and `f4` is
  high for 3 clocks in 5.

`mc` matters only at one point in each `f4` cycle. That is the second rising
clock edge after `f4` rises, where DFF2 rises and DFF3 captures
`NAND2(mc, 1)`. The cycle that contains that edge is 5 clocks long if `mc` was
1 there, and 4 if it was 0. Switching `mc` between cycles gives a clean 4 or 5
with no lost or extra state. No state locks up: from the cleared state `000`
the ring is in its cycle after one clock.

## The ripple counter and the modulus-control windows

In `ripple_div16`, each stage feeds its Q-bar back to its D, so it toggles on
every clock it gets. Stage 0 is clocked by `f4`. Stage *i* is clocked by the Q
of stage *i-1*. The 4-bit word `fdiv = {F64, F32, F16, F8}` therefore counts
down by one at every rising edge of `f4`, and it holds each of its 16 values
for exactly one prescaler cycle per output period. `out` is the last stage,
F64.

`mc_control` splits the 16 counter states into four disjoint *windows*.
Window A*k* is active in 2^k states and is enabled by program bit d*k*:

| window | condition on the counter           | states | gated by |
|--------|------------------------------------|--------|----------|
| A3     | F64 = 1                            | 8      | d[3]     |
| A2     | F64 = 0, F32 = 1                   | 4      | d[2]     |
| A1     | F64 = F32 = 0, F16 = 1             | 2      | d[1]     |
| A0     | F64 = F32 = F16 = 0, F8 = 1        | 1      | d[0]     |

`mc` is the OR of the four gated windows. It is therefore high in exactly
`d = 8 d3 + 4 d2 + 2 d1 + d0` of the 16 prescaler cycles. Those cycles are 5
clocks long, which gives the period 64 + d. The decoders need 1, 2, 3 and 4
inputs for A3..A0. This matches the gate count of the reference schematic, but
the exact taps (Q or Q-bar of each stage) are this design's own choice. Any
choice of four disjoint windows of sizes 8, 4, 2 and 1 gives the same ratios.
Only where the 5-clock cycles fall within the period would change.

`out` is high for 8 of the 16 prescaler cycles (A3's window). Its high time is
32 + 8·d3 clocks and its low time is 32 + (d mod 8) clocks. For `d = 0` it is a
square wave at fin/64.

## Timing

* **mc settling.** The counter changes at a rising edge of `f4`, and `dmp45`
  samples `mc` one input clock later. At register-transfer level everything
  settles within the edge. In silicon, the ripple through the counter stages
  that change plus the control gates must settle within one input period. The
  deepest case is a borrow through all four stages, which happens once per
  output period.
* **Reset.** `rst` is an asynchronous, active-high clear of all seven
  flip-flops. After it is released, `out` rises on the first rising `clk`
  edge (the counter steps from 0 to 15) and then every 64 + d clocks.
* **Changing `d`.** `d` is read continuously. The output period in which it
  changes can have a ratio between the old and the new value. The following
  periods have the new ratio.
* **Latency.** `out` is a divided clock, not data. It rises in the same clock
  edge as the `f4` edge that moves the counter from 0 to 15.

## Top-level interface (`prog_prescaler`)

| port   | dir | width  | meaning |
|--------|-----|--------|---------|
| `clk`  | in  | 1      | input clock (VCO output) |
| `rst`  | in  | 1      | asynchronous clear, active high |
| `d`    | in  | STAGES | program word; ratio = 4·2^STAGES + d |
| `out`  | out | 1      | divided clock (to the phase detector), F64 |
| `f4`   | out | 1      | output of the 4/5 prescaler |
| `fdiv` | out | STAGES | ripple counter stages, bit 0 = F8 |
| `mc`   | out | 1      | modulus control |

`STAGES` (default 4) sets the number of ripple stages and program bits. The
published design has 4. Other values follow the same construction with ratio
4·2^STAGES .. 4·2^STAGES + 2^STAGES - 1.

## What follows the reference circuit and what is this design's own

Taken from the reference circuit:
* the partition into a 4/5 prescaler, a ripple divide-by-16 and a control block
* the prescaler's gates and their function
* the stage order F4 → F8 → F16 → F32 → F64
* the window/AND/OR form of the control block
* the ratio 64 + d

This design's own choices:
* **Flip-flop model.** The 11-transistor TSPC flip-flop is modelled as an
  ordinary rising-edge flip-flop. Its dynamic storage, and any minimum clock
  frequency that comes with it, are not modelled.
* **Clear.** The asynchronous clear on every flip-flop stands in for the CLR
  pin of the flip-flop symbol. The transistor cell has none. The PRE pin of the
  symbol is never used and is left out.
* **Window decode.** The exact decoding of the windows A0..A3 (see above).
* **Count direction.** The counter counts down, which follows from clocking
  each stage from the previous Q. Only the number of states affects the ratio.
* **Observation ports.** The `f4`, `fdiv` and `mc` ports, and the generalising
  `STAGES` parameter.

The ripple counter uses flip-flop outputs as clocks. That is the point of the
architecture, and it is kept as such. Timing tools will see four generated
clocks.

## Simulation

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Every testbench has a watchdog. The
testbenches are:

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_tspc_dff`         | capture on the rising edge, hold on the falling edge, Q-bar, asynchronous clear |
| `tb_dmp45`            | period 4 (high 2) with mc = 0, period 5 (high 3) with mc = 1, and 200 cycles with mc random per cycle, each period 4 + mc |
| `tb_ripple_div16`     | count-down sequence, period 2^(k+1) and 50 % duty of every stage, clear during a count |
| `tb_mc_control`       | all 256 (q, d) pairs against a highest-set-bit reference; mc high in exactly d of 16 states |
| `tb_prog_prescaler`   | default size. All 16 ratios 64..79 measured, d of 16 prescaler cycles of length 5, out high for 8 prescaler cycles, first edge after reset, random changes of d. Counts divide-by-4 cycles, divide-by-5 cycles, mc switches, d changes and resets, and fails if any never happened. |
| `tb_div64_waveforms`  | d = 0 with a 20 GHz (50 ps) clock. f4, F8, F16, F32, F64 are square waves of period 4, 8, 16, 32, 64 clocks, and mc stays low |

To run one with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -y rtl +libext+.sv --top-module tb_prog_prescaler tb/tb_prog_prescaler.sv
    ./obj_dir/Vtb_prog_prescaler

Replace the testbench name for the others. All of them finish in well under a
second.
