# Clock-gated multiply-accumulate unit for a 64-bit RISC-V core

This is a multiply-accumulate (MAC) unit for the execute stage of a 64-bit
RISC-V processor of the SHAKTI C-Class kind. It computes

    acc <= a * b + acc        (signed)

once per cycle. It is built to use little power when it has nothing to do. A
MAC beside a general-purpose pipeline is idle most of the time, but its
operand buses still toggle with unrelated traffic and its clock still reaches
a wide accumulator register. Two measures stop this. Both are driven by one
enable signal:

* **Operand isolation.** While the enable is low, the multiplier's inputs are
  forced to zero. Changes on the operand buses then do not ripple through the
  64x64 multiplier and the 128-bit adder.
* **Clock gating.** While the enable is low, a clock-gating cell stops the
  clock of the accumulator register. Its 128 flip-flops see no clock edges.

The architecture follows the paper "Power-Efficient Shakti C-Class Processor
for DSP Accelerator" (Durgashree M N, Hemanth Kumar A R, Chandra Mohan
Umamathy). In that paper the MAC has three parts: operand isolation, a signed
multiplier, and an enable-controlled output register. Clock gating follows
GCLK = CLK · EN. The paper reports synthesis results for the whole processor in
a 180 nm standard-cell library. Against the ungated baseline, total power is
16.7 % lower, area is 2.85 % higher and delay is 0.37 % longer. Those numbers
belong to the full processor. They cannot be reproduced from this RTL, which
holds only the MAC subsystem.

## Datapath

```
           en_i ───────────────┬──────────────────────────────┐
                               │                              │
 a_i ──┐   ┌─────────────────┐ │  ┌───────────────────┐       │
       ├──►│operand_isolation├─┴─►│ signed_multiplier │       │
 b_i ──┘   │  (AND with en)  │    │  64x64 -> 128     │       │
           └─────────────────┘    └─────────┬─────────┘       │
                                            │ product         │
                               ┌────────────▼─────────────┐   │
                   clr_i ─────►│ accumulator_register     │◄──┘ (en)
                               │ sum = clr ? p : acc + p  │
                               │ 128-bit register         │──► acc_o
                               └────────────▲─────────────┘
                                            │ gclk
 clk_i ──────────────────────►┌──────────┐  │
 en_i ───────────────────────►│clock_gate├──┘
                              └──────────┘
 clk_i, en_i ──► valid flop ──► valid_o
```

| module | file | role |
|---|---|---|
| `mac_unit` | `rtl/mac_unit.sv` | top: wires the parts, holds `valid_o` and the isolation assertion |
| `clock_gate` | `rtl/clock_gate.sv` | latch + AND gating cell |
| `operand_isolation` | `rtl/operand_isolation.sv` | zeroes both operands while idle |
| `signed_multiplier` | `rtl/signed_multiplier.sv` | W x W -> 2W two's-complement product |
| `accumulator_register` | `rtl/accumulator_register.sv` | adder and enable-controlled register |
| `mac_pkg` | `rtl/mac_pkg.sv` | `XLEN = 64` |

## The clock-gating cell and its timing

This is the part to understand before changing anything. A bare AND of clock
and enable, taken literally from GCLK = CLK · EN, passes any glitch on the
enable while the clock is high. It also cuts a clock pulse short if the enable
falls during the high phase. `clock_gate` therefore puts a latch in front of
the AND:

* The latch is transparent while `clk_i` is low, so the enable may settle at
  any time in the low phase.
* It holds while `clk_i` is high, so whatever the enable does then cannot
  reach `gclk_o` until the next cycle.

This is the standard integrated clock-gating cell. In an ASIC flow, map it to
the library's ICG cell.

The rule for whoever drives `en_i` is: **settle it before the rising edge of
`clk_i`**. This is the same rule as for any synchronous input. Drive it from
logic clocked by `clk_i`, as a pipeline register would.

Which registers are gated:

* The accumulator register is on the gated clock. It also keeps its own enable
  test, so it stays correct on a free-running clock and synthesis can merge
  the two.
* `valid_o` is on the free-running clock, because it has to fall when the unit
  goes idle.

The gated clock `gclk` is derived from `clk_i` inside the unit. Static timing
needs it declared as a generated clock.

## Arithmetic

* **Operands.** `a_i` and `b_i` are signed XLEN-bit values (64 by default, the
  core's register width).
* **Product.** The multiplier returns the full 128-bit product. `signed_multiplier`
  is written as a `*`, so synthesis chooses the multiplier structure.
* **Accumulator.** It is `ACC_W = 2*XLEN` = 128 bits. The product is
  sign-extended (or truncated, if `ACC_W` is set smaller) to this width.
  Accumulation wraps modulo 2^128 and does not saturate. One product always fits.
  Summing two products of (−2^63)·(−2^63) already passes 2^127 and wraps
  negative. The testbench checks this case.
* **Starting a sum.** Assert `clr_i` together with `en_i` on the first term.
  The register then loads `a*b` instead of adding it.
* **Reset.** `rst_ni` is asynchronous and active low. It clears the
  accumulator and `valid_o`.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i` | in | 1 | clock |
| `rst_ni` | in | 1 | asynchronous reset, active low |
| `en_i` | in | 1 | operands valid: do one MAC this cycle |
| `clr_i` | in | 1 | with `en_i`: start a new sum |
| `a_i`, `b_i` | in | XLEN | signed operands |
| `acc_o` | out | ACC_W | accumulator |
| `valid_o` | out | 1 | `acc_o` holds the result of the previous cycle's operation |

Inputs are sampled on the rising edge of `clk_i`. The result is in `acc_o`
after that edge: latency one cycle, throughput one MAC per cycle. With `en_i`
low, `acc_o` holds its value.

A concurrent assertion in `mac_unit` checks the isolation rule:
whenever `en_i` is low at a clock edge, the multiplier inputs must be zero.

## What is taken from the source and what is not

Taken from the source architecture:

* The three datapath parts.
* The single enable that controls both operand propagation and the output
  register.
* Gating of the MAC's registers with CLK · EN.
* The 64-bit width of the host core.

Choices of this design, where the source says nothing:

* The latch in the gating cell. The source mentions only "integrated clock-gating cells".
* Zeroing as the isolation method.
* The 128-bit accumulator and wrap-around arithmetic.
* The `clr_i` input.
* `valid_o` and its one-cycle latency.
* The reset style.

Not included:

* **The processor core.** The pipeline, branch prediction, caches, TLBs,
  bypass logic and AXI interfaces are those of the existing SHAKTI C-Class
  design. The source architecture does not define them. The source also gives
  no instruction encoding or decode path for the MAC, so its processor-side
  signals are the ports of `mac_unit`. Hooking it up means decoding a MAC
  instruction into `en_i`/`clr_i` and reading `acc_o` back into the register
  file (one 64-bit half at a time, or as the integration prefers).
* **Processor-wide clock gating.** The synthesis tool inserts this on the
  processor netlist. Only the MAC subsystem's own gating cell is in this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_clock_gate` | `gclk` equals the clock when enabled and stays low otherwise; an enable change during the high phase does not pass; gated-edge count |
| `tb_operand_isolation` | outputs equal inputs when enabled, zero otherwise (random) |
| `tb_signed_multiplier` | corner operands (0, ±1, most negative/positive) and random 64-bit and 16-bit operands |
| `tb_accumulator_register` | random enable/clear/addend sequences against a model; reset value |
| `tb_mac_unit` | end to end at the default size (see below) |

The multiply reference (`tb/tb_mac_ref_pkg.sv`) does shift-and-add on
magnitudes and applies the sign afterwards. It does not reuse the `*` operator
of the design.

`tb_mac_unit` runs with the default parameters and does the following:

* It runs a 16-tap FIR filter over 64 samples of 16-bit signed data, with
  random idle gaps in which the operand buses keep toggling.
* It runs 500 cycles of full-width random operands, with random enable and
  clear.
* It checks wrap-around, and a mid-run reset.

Every cycle it checks the one-cycle latency of `valid_o` and `acc_o`, that the
accumulator holds while idle, that the multiplier sees zeros while idle, and
that the gated clock pulses exactly when enabled. It counts accumulations,
clears, gated idle cycles, isolated idle cycles, negative products and
accumulator wraps. Any mechanism that never occurred counts as a failure.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mac_pkg.sv tb/tb_mac_ref_pkg.sv tb/tb_mac_unit.sv --top-module tb_mac_unit
./obj_dir/Vtb_mac_unit
```

Verilator is a two-state simulator. The testbenches start with reset
deasserted and then pull it low, so that the asynchronous reset sees a falling
edge. They change `en_i` in the clock's low phase, as the gating cell requires.

## Changing it

* `XLEN` (on `mac_unit`, default from `mac_pkg`) sets the operand width.
* `ACC_W` sets the accumulator width. For guard bits in long sums, set it above
  `2*XLEN`; the product is sign-extended.
* Turning gating off, for a power comparison, means feeding `clk_i` straight
  to `u_acc`. The register's own enable keeps the function the same.
