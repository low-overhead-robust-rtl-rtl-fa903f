# FIR filter core with an RTL-embedded ownership signature

This is an 8-tap FIR filter core whose register-transfer structure carries a
secret mark of its owner. The filter gives the same result whatever the mark is.
The mark is in how the datapath is built:

- some operand multiplexers are split into smaller ones;
- some result de-multiplexers are split into smaller ones;
- some intermediate registers are merged into one shared register.

An owner who knows the signature can check a netlist for exactly these choices.
To someone who does not know it, they look like ordinary engineering choices:
splitting a large multiplexer and sharing registers are everyday practice.

The core is written so that the signature is a set of parameters. The default
build carries a 14-digit signature, and the same source can also build the
smaller signatures and the unmarked datapath.

## The signature

A signature is a string over three digit types.

| digit | effect on the RTL |
|-------|-------------------|
| θ (theta) | one n:1 operand multiplexer becomes two n/2:1 multiplexers followed by a 2:1 multiplexer |
| φ (phi)   | one 1:n result de-multiplexer becomes a 1:2 de-multiplexer feeding two 1:n/2 de-multiplexers |
| ω (omega) | two or three intermediate registers, live in different control steps, become one register |

Digits are applied in a fixed resource order. θ digits go, one each, to the
multiplexers in this order:

1. A1 left operand (16:1)
2. A1 right operand (16:1)
3. A2 left operand (8:1)
4. A2 right operand (8:1)
5. M1 left operand (4:1)
6. M1 right operand (4:1)
7. M2 left operand (4:1)
8. M2 right operand (4:1)

φ digits go to the de-multiplexers of A1 (1:16), A2 (1:8), M1 (1:4) and M2 (1:4),
in that order. The first ω digit merges Reg1 and Reg2. The second ω digit merges
Reg3, Reg4 and Reg5. Every unit has two operand multiplexers and one result
de-multiplexer, so a signature holds twice as many θ digits as φ digits.
`fir_sig_core` stops elaboration with an error if this does not hold, or if a
count exceeds what the datapath has.

| signature | `THETA` | `PHI` | `OMEGA` |
|-----------|---------|-------|---------|
| θθθθθθθθφφφφωω (default, 14 digits) | 8 | 4 | 2 |
| θθθθφφωω (8 digits) | 4 | 2 | 2 |
| θθθθφφ (6 digits) | 4 | 2 | 0 |
| θθφ (3 digits, the smallest) | 2 | 1 | 0 |
| none (unmarked reference) | 0 | 0 | 0 |

With three digit types and w digits, there are 3^w candidate signatures of
that length. An attacker who guesses blindly must search them all: 27 for
w = 3, and 4,782,969 for w = 14.

A split keeps the function of the multiplexer or de-multiplexer. The select's
most significant bit drives the 2:1 (or 1:2) stage, and the remaining bits
drive the two half-size parts. A merged register gets a write multiplexer
(`Sel_R`, 2:1 or 4:1) in front and a read de-multiplexer (`DSel_R`, 1:2 or 1:4)
behind. In this way, the A1 operand that once read "Reg2" now reads the shared
register through a de-multiplexer output.

## The filter and its schedule

The filter computes

    y = Σ_{k=1..8} (IN_k + PRE_K_k) · COEF_k   (mod 2^16)

Its data-flow graph has 23 operations:

- 8 pre-additions: op1 to op8, where op_k = IN_k + PRE_K_k;
- 8 multiplications: op9 to op16, where op(8+k) = op_k · COEF_k;
- 7 chained additions: op17 = op9 + op10, op18 = op17 + op11, and so on up to
  op23 = op22 + op16, which is the output.

The graph runs on two adders (A1, A2) and two multipliers (M1, M2) in nine
control steps:

| step | A1 | A2 | M1 | M2 | register written | register read by A1 |
|------|----|----|----|----|------------------|---------------------|
| cs1 | op1 | op2 | | | | |
| cs2 | op3 | op4 | op9 | op10 | | |
| cs3 | op17 | op5 | op11 | op12 | | |
| cs4 | op18 | op6 | op13 | | Reg1 ← op12 | |
| cs5 | op19 | op7 | | op14 | Reg2 ← op13 | Reg1 |
| cs6 | op20 | op8 | op15 | | Reg3 ← op14 | Reg2 |
| cs7 | op21 | | | op16 | Reg4 ← op15 | Reg3 |
| cs8 | op22 | | | | Reg5 ← op16 | Reg4 |
| cs9 | op23 | | | | | Reg5 |

Each register is written in one step and read in the next. At most one
register of each group is live at a time. That is why Reg1/Reg2 and
Reg3/Reg4/Reg5 can share storage without changing the result.

## Datapath: legs

Around each unit is the same column, built by `fu_slice`:

    operand muxes (Sel) → operand latches (Lstr) → adder/multiplier (En)
      → result latch (Ostr) → result de-multiplexer (DSel)

The key to reading the wiring is the **leg**. Each operation bound to a unit
has one input on both operand multiplexers and one output on the
de-multiplexer. The leg number is the operation's rank, by step, among that
unit's operations. A1 has 9 operations, so its multiplexers are 16:1. A2 has 6,
so 8:1. M1 and M2 have 4 each, so 4:1. A result leaves the producing unit on
its own de-multiplexer output, and that wire goes straight to the leg of the
operation that consumes it.

| unit | leg: left operand, right operand → where the result goes |
|------|-----------------------------------------------------------|
| A1 | 0: IN1, K1 → M1 leg 0 · 1: IN3, K3 → M1 leg 1 · 2: M1(op9), M2(op10) → A1 leg 3 · 3..8: A1 previous sum, M1(op11) / Reg1..Reg5 → A1 next leg; leg 8 → OUT |
| A2 | 0..5: IN2, IN4, IN5, IN6, IN7, IN8 with their K → M2 leg 0, M2 leg 1, M1 leg 2, M2 leg 2, M1 leg 3, M2 leg 3 |
| M1 | 0..3: op1, op3, op5, op7 times C1, C3, C5, C7 → A1 leg 2 (left), A1 leg 3 (right), Reg2, Reg4 |
| M2 | 0..3: op2, op4, op6, op8 times C2, C4, C6, C8 → A1 leg 2 (right), Reg1, Reg3, Reg5 |

Unused legs are tied to zero. A de-multiplexer output that is not selected
reads zero.

## Timing and interface

One control step takes two clock cycles:

- **Load cycle.** The controller sets each busy unit's `sel` to the leg of its
  operation and pulses `lstr`. The operand latches capture the multiplexer
  outputs.
- **Execute cycle.** `en` and `ostr` are high. The unit computes from the
  latched operands, and the result latch captures the result. A register
  scheduled for this step is written at the same clock edge.

Each unit's de-multiplexer select is a register that holds the leg of the
unit's most recent result. A result therefore stays routed to its consumer
during the whole next step, and the consumer's operand latch picks it up in
that step's load cycle. The shared registers work because a read (load cycle)
always comes before the overwrite (execute cycle) in the same step.

`fir_sig_core` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous reset, active low; clears all latches, registers and the controller |
| `start` | in | 1 | start one evaluation; sampled only while `busy` is low |
| `x` | in | 8×16 | samples; `x[k-1]` is IN_k. Hold it steady while `busy` is high (IN8 is read in step 6). |
| `y` | out | 16 | result, held until the next result |
| `y_valid` | out | 1 | one-cycle pulse when `y` is new |
| `busy` | out | 1 | an evaluation is in progress |

The cycle timing is fixed:

- Cycle 0: `start` is sampled.
- Cycles 1 to 18: the nine steps run.
- Cycle 19: output cycle. A1's de-multiplexer is on the OUT leg, and the output
  register captures the result.
- Cycle 20: `y_valid` is high. `start` may be raised in this same cycle.

The core is not pipelined. It gives one result per 20 cycles.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `THETA` | 8 | number of θ digits (0..8) |
| `PHI` | 4 | number of φ digits (0..4), must be `THETA/2` |
| `OMEGA` | 2 | number of ω digits (0..2) |
| `PRE_K` | 1, 2, ..., 8 | second operand of the pre-additions, tap 1 first |
| `COEF` | 3, −5, 7, 11, 11, 7, −5, 3 | tap coefficients (16-bit two's complement) |
| `DATA_W` | 16 | word width; a package constant in `fir_sig_pkg` |

The leaf modules (`sig_mux`, `sig_demux`, `fu_slice`, `reg_group`) take
`N`/`NREG`, `W` and a `SPLIT`/`SHARED` bit. `fir_sig_core` sets them from the
digit counts.

## What comes from the method and what is this design's own

These parts follow the published method:

- the 23-operation graph;
- the nine-step schedule and the binding of every operation to A1, A2, M1 or M2;
- the intermediate registers Reg1 to Reg5 and the steps in which they live;
- the multiplexer and de-multiplexer sizes (16, 8, 4, 4);
- the per-unit column of multiplexers, latches, unit and de-multiplexer, with
  its `Sel`, `Lstr`, `En`, `Ostr` and `DSel` signals;
- the three digit types, the rule for splitting, and the resource order in
  which digits are applied;
- the select bit split of the broken-up trees (MSB on the 2:1 or 1:2 stage);
- the two shared-register groups of the 14-digit example.

These parts are this design's own choices, because the method does not give
them:

- **The second operands.** The graph draws one sample into each pre-addition
  and one data input into each multiplication. The other operand is taken here
  to be a per-tap constant (`PRE_K`, `COEF`). If your filter has a different
  second operand, change the right-operand legs in `fir_sig_core`.
- **Word width and arithmetic.** 16 bits, wrapping modulo 2^16. This width
  makes the 8 inputs, the output and the clock come to 145 pins, the pin count
  reported for an FPGA build of this filter. This core adds `rst_n`, `start`,
  `y_valid` and `busy` on top of those.
- **The latches** are edge-triggered registers with a load strobe, so the
  whole core runs on one clock.
- **Two clock cycles per control step.** This is how the design reads the
  separate operand strobe and result strobe.
- **`en` low forces the unit's output to zero.**
- **The controller.** Its state machine, the held de-multiplexer select and the
  start/busy/valid handshake are this design's. So is the register on the
  output.
- **Leg order.** Which multiplexer input carries which wire within a unit
  follows the rank rule described above. The published datapath drawing does
  not number the inputs.

The filter order is stated in two ways in the source: as eighth order and as
seventh order. Both refer to the same 8-input graph, and that graph is what is
built here.

The published FPGA resource counts are not reproduced by this RTL: logic
elements, 52 to 65 registers, and overheads of 3 % to 6 %. This datapath holds
258 flip-flop bits:

- 8 operand latches and 4 result latches of 16 bits each;
- the intermediate registers;
- the output register;
- the controller state.

Resource figures from a particular FPGA flow should not be expected to match.

Not built, because they are not hardware in the core:

- the procedure an owner uses to inspect a suspect core and verify the
  signature;
- the design-space exploration that chose two adders and two multipliers.

## Files

| file | contents |
|------|----------|
| `rtl/fir_sig_pkg.sv` | width, sizes, control-word structs, the schedule as functions, default constants |
| `rtl/fir_sig_core.sv` | top: controller, four slices, two register groups, leg wiring, output register |
| `rtl/fir_controller.sv` | step sequencer producing all selects and strobes |
| `rtl/fu_slice.sv` | one unit with its muxes, latches and de-multiplexer |
| `rtl/sig_mux.sv`, `rtl/sig_demux.sv` | flat or signature-split multiplexer / de-multiplexer |
| `rtl/mux_n.sv`, `rtl/demux_n.sv` | leaf N:1 / 1:N cells |
| `rtl/reg_group.sv` | separate or shared intermediate registers |
| `rtl/strobe_latch.sv` | strobed storage element |
| `rtl/func_unit.sv` | adder or multiplier with enable |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fir_sig_variants` |

## Simulation

Every testbench checks itself against values it computes on its own. Each one
ends by printing `TB_RESULT checks=N failures=M`. Each also has a watchdog.

The testbenches:

- `tb_fir_sig_core` runs the default (14-digit) core for 200 random sample
  sets, some of them back to back. For each set it checks:
  - the result against the formula above;
  - the 20-cycle latency;
  - the `busy` and `y_valid` behaviour;
  - that `y` is stable between results.

  It also counts uses of the upper half of split multiplexers and
  de-multiplexers, and rewrites of both shared registers. It fails if any count
  is zero.
- `tb_fir_sig_variants` runs five cores side by side on the same inputs:
  - the 3-digit signature;
  - the 6-digit signature;
  - the 8-digit signature;
  - the unmarked structure;
  - a 14-digit core with other constants.

  All must give the reference result.
- `tb_fir_controller` checks every control output in every cycle against an
  independent copy of the schedule.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fir_sig_pkg.sv tb/tb_fir_sig_core.sv --top-module tb_fir_sig_core
    ./obj_dir/Vtb_fir_sig_core

Replace `tb_fir_sig_core` with any other testbench name. All of them finish in
well under a second.
