# Clock-gated multi-bit flip-flop MAC

Most of the dynamic power of a synchronous block goes into its clock: every
flip-flop is clocked every cycle, even when the value it would capture equals
the one it already holds. This design cuts that waste in two ways and applies
both to a small multiply-accumulate (MAC) unit:

* **Multi-bit flip-flops (MBFFs).** Flip-flops are merged in pairs into 2-bit
  cells that share one clock driver, so each pair loads one clock buffer
  instead of two.
* **Data-driven clock gating by group.** Neighbouring flip-flops, chosen by
  bit position, form a group with one clock gate. Before each rising edge the
  gate checks whether any bit of the group is about to change. If none is, the
  group gets no clock pulse in that cycle.

The gating is transparent: every register in the design produces the same
values a plain register would. Only the number of clock pulses that reach the
flip-flops changes. The default configuration has groups of two flip-flops,
which is one MBFF cell per clock gate. Groups of 4, 8 and 16 flip-flops are
selected with one parameter.

## The data-driven clock gate (`dd_clock_gate`)

This is the part that needs the most care. For a group of `K` flip-flops with
inputs `d` and outputs `q`:

```
clk_en     = |(d ^ q)            // some bit would change at the next edge
en_latched = clk_en  while clk == 0, held while clk == 1   (latch)
gclk       = clk & en_latched    // AND-type clock gater
```

Timing, for one cycle:

1. While `clk` is low, the latch is transparent. `clk_en` follows the D
   inputs as they settle.
2. At the rising edge of `clk` the latch closes. The value `clk_en` had just
   before the edge decides the whole high phase: `gclk` either rises with
   `clk` or stays low.
3. The flip-flops that were clocked now update `q`, and the upstream logic may
   change `d`. Both move `clk_en`, but the latch is closed, so `gclk` cannot
   glitch or get cut short.
4. `gclk` falls with `clk`, and the latch opens again.

If a group is skipped, all its bits already hold the value they would have
loaded, so skipping the edge changes nothing. The decision uses no extra cycle
of latency: `gclk` rises in the same edge as `clk`, one AND gate later. In a
physical design, the hold constraint between the latch and the AND gate is the
usual one for an integrated clock-gating cell. In practice the latch and AND
come from a library ICG cell.

The latch is intentional. It is the only latch in the design: one per group,
16 at the default settings.

**Group size trade-off.** A bigger group amortises one gate (`K` XORs, an
OR, a latch and an AND) over more flip-flops. But the group is clocked
whenever *any* of its bits changes, so it gates less often. The testbench
`tb_mac_groups` measures this on one operand stream with a low toggle rate
(each operand changes one bit in a quarter of the cycles):

| flip-flops per gate | clock gates (two 16-bit registers) | flip-flop clock pulses suppressed |
|---|---|---|
| 2  | 16 | 55 % |
| 4  | 8  | 41 % |
| 8  | 4  | 31 % |
| 16 | 2  | 28 % |

These are counts of clock pulses, not power. Power also depends on the cell
library, on the capacitance of the gate and of the flip-flop clock pins, and on
wiring. For independent bits that each toggle with probability `p`, the best
group size shrinks as `p` grows: about 8 near `p = 0.01` and about 3 near
`p = 0.1`. The groups are contiguous, so a gated group of `2k` bits means
both of its `k`-bit halves are gated too. The suppressed fraction can
therefore only fall as groups grow.

## The 2-bit MBFF cell (`mbff2`)

Two positive-edge D flip-flops with one clock pin. In a transistor-level cell
the two bits share the inverters that make the internal clock phases for
their master and slave latches. At register-transfer level that sharing is the
single `clk` pin. Each bit has its own set and reset pin, so `set` and
`reset` are 2-bit vectors. Both act asynchronously and active-high, and reset
wins over set.

As with any edge-modelled set/reset flip-flop, suppose a bit is reset while
set is also held. When reset is then released, the bit stays 0 until the next
clock edge or rising edge of set. Some synthesis front ends cannot map a
flip-flop that has both asynchronous set and reset. The cell keeps true
set/reset behaviour instead of merging the two pins, because merging them loses
a direct set-to-reset hand-over.

## Groups and registers

* `gated_mbff_group #(GROUP_FF)`: one `dd_clock_gate` over `GROUP_FF` bits,
  driving `GROUP_FF/2` `mbff2` cells. `GROUP_FF` must be a multiple of 2.
  The group also brings out its `clk_en` and `gclk`.
* `gated_register #(WIDTH, GROUP_FF)`: a register cut into
  `WIDTH/GROUP_FF` groups of adjacent bits. Group `g` holds bits
  `[g*GROUP_FF +: GROUP_FF]`. `grp_en[g]` is group `g`'s enable for the
  coming edge. `set` and `reset` reach every bit.

## The MAC datapath (`mac_top`)

```
in_1[7:0] ─┐
           ├─ multiplier ─ multi_out[15:0] ─► product register ─ ain[15:0]
in_2[7:0] ─┘                                                       │
                                  ┌──────────────────────────────► adder ─ aout[15:0]
                                  │                                  │
                                  └── out[15:0] ◄─ accumulator register
```

Each rising edge does two things:

* `ain <= in_1 * in_2`
* `out <= out + ain`

The arithmetic is unsigned. A product reaches `ain` one edge after the
operands are applied, and is part of `out` one edge later, two edges in all.
The 16-bit accumulator wraps modulo 2^16, and `carry` flags the edge on which it
wraps. There is no accumulate-enable or clear control: the unit accumulates on
every edge. `reset` clears both registers, and `set` sets every bit of both.

Example, after reset, with operand pairs (2,32), (13,2), (4,32), (16,16) on
consecutive edges:

* products: 64, 26, 128, 256
* `out`: 64, 90, 218, 474

The accumulator lags each product by one edge.

Both registers are `gated_register` instances: 32 flip-flops in 16 MBFF cells.
The observation ports `prod_grp_en` and `acc_grp_en` show which groups are
clocked on the next edge.

Parameters of `mac_top`:

| parameter | default | meaning |
|---|---|---|
| `OPERAND_W` | 8 | width of `in_1`, `in_2`; the product register is `2*OPERAND_W` wide |
| `ACC_W` | 16 | width of adder and accumulator (must be at least `2*OPERAND_W`) |
| `GROUP_FF` | 2 | flip-flops per clock gate (2, 4, 8 or 16 at the default widths) |

The shared defaults live in `mac_pkg`.

## What is taken as given, and what was chosen here

The following are the described design:

* the structure of the clock gate: per-bit XOR, OR across the group, a latch
  transparent while the clock is low, and an AND;
* the 2-bit MBFF with a shared clock and 2-bit set and reset;
* grouping by bit position;
* the MAC structure: 8-bit operands, a 16-bit product register, a 16-bit
  adder fed back from a 16-bit accumulator register;
* the signal names.

The following are this implementation's choices:

* unsigned operands;
* wrap-around accumulation and the carry output;
* set and reset active high and asynchronous, with reset winning;
* groups made of contiguous bit slices;
* no accumulate-enable control;
* the per-group enable outputs.

One figure of the source draws the MBFF reset pin as active low. Its simulated
waveform pulses reset high, and this design follows the waveform.

The source compares power figures for each group size. Power is outside what
RTL simulation can show; `tb_mac_groups` reports clock-pulse counts instead.

## Files

* `rtl/mac_pkg.sv`: shared widths and group size.
* `rtl/dd_clock_gate.sv`: the data-driven clock gate.
* `rtl/mbff2.sv`: the 2-bit MBFF cell.
* `rtl/gated_mbff_group.sv`, `rtl/gated_register.sv`: groups and registers.
* `rtl/multiplier.sv`, `rtl/adder.sv`: the datapath units.
* `rtl/mac_top.sv`: the MAC unit, which is the top.

Every block has a testbench `tb/tb_<block>.sv`. Each one checks its block
against an independent reference, counts checks and failures, and ends with a
`TB_RESULT checks=N failures=M` line. The tests do the following:

* `tb_dd_clock_gate`: checks the pulse decision and glitch-free behaviour when
  D changes in the high phase.
* `tb_mbff2`: walks through load, hold, per-bit set and reset.
* `tb_gated_mbff_group` and `tb_gated_register`: check values and count clock
  pulses for each group.
* `tb_mac_top`: runs the full unit at default parameters. It covers the
  example sequence above, the two-edge latency, fully gated registers, set,
  reset and accumulator wrap, then 3000 random cycles against a cycle model.
* `tb_mac_groups`: checks that group sizes 2, 4, 8 and 16 give identical
  results, and measures the suppressed pulses.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mac_pkg.sv tb/tb_mac_top.sv --top-module tb_mac_top -o sim
./obj_dir/sim
```

To run another test, replace `tb_mac_top` with its name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/mac_pkg.sv
rtl/<module>.sv`. Each test finishes in well under a second. The clocks in the
testbenches are generated with delays, so `--timing` is required.
