# Pulsed-latch shift register with sub-shift registers

A long shift register (256 bits here) is usually a chain of master-slave
flip-flops, that is, two latches per bit with every latch clocked. This design stores each bit in
**one** pulsed latch instead, which roughly halves the storage area and the clock load.
The catch is that a chain of latches all opened by the same short pulse races.
While latch *k* is open, its input (latch *k-1*) is changing too, so a bit can run through
several stages in one pulse.

The design removes the race with **several non-overlapping delayed pulses per clock cycle,
fired in reverse data order**. Each latch opens only after the latch it feeds has already taken
its old value, so every latch sees a steady input for the whole of its own pulse.

One pulse per bit would need 256 delayed clocks. To avoid that, the register is cut into
**sub-shift registers** of 4 data latches. Each sub-shift register has one extra **temporary
latch T**. All sub-shift registers share the same five pulses from a single generator.

## How one shift happens

Take one 4-bit sub-shift register with data latches Q1..Q4 and temporary latch T. In every
clock cycle the generator fires five pulses, one after the other, never overlapping:

| order | pulse            | effect                                   |
|-------|------------------|------------------------------------------|
| 1     | `clk_pulse[0]` (T) | T ← Q4 (the bit leaving this sub-register) |
| 2     | `clk_pulse[4]`   | Q4 ← Q3                                  |
| 3     | `clk_pulse[3]`   | Q3 ← Q2                                  |
| 4     | `clk_pulse[2]`   | Q2 ← Q1                                  |
| 5     | `clk_pulse[1]`   | Q1 ← input (serial `din`, or T of the previous sub-register) |

Every sub-shift register gets its T pulse at the same moment, and its Q1 pulse comes last.
So when Q1 of sub-register *k+1* opens, T of sub-register *k* already holds the bit that was in
Q4 of *k* at the start of the cycle. The whole chain therefore moves exactly one place per
clock, just like a 256-bit flip-flop chain. The cost is 320 latches (64 × 5) against 512 in
flip-flops (256 × 2). T only buffers data in flight and is not part of the visible content.

Making the sub-register longer needs fewer extra T latches but more pulses per cycle. The
length is the parameter `SUB_LEN`, and the generator and sub-register scale with it.

## The latch

`modified_ssaspl` stands for a static differential sense-amplifier shared pulsed latch. In
silicon it is a 7-transistor cell. It takes **differential** data: D and Db come straight from
the Q and Qb of the previous latch, so the cell needs no input inverter of its own. Here it is
modelled by its logic function:

- it is transparent while `clk_pulse` is high and `d != db`;
- it holds otherwise, and that includes `d == db`, when the sense amplifier has nothing to
  resolve (a modelling choice);
- `qb` is always `~q`.

It is written with `always_latch` and is synthesizable, so lint and synthesis will report a
latch here. That latch is intended.

## The pulse generator

`clock_pulse_circuit` is a delay stage and an AND gate: `pulse = clk & ~(clk delayed by
WIDTH_PS)`. The result is one clean pulse, `WIDTH_PS` wide, on each rising edge.
`delayed_pulse_gen` passes the clock down a chain of `STEP_PS` delay stages and puts one
clock-pulse circuit on every tap. Each output pulse is cut by its own gate, so it can be
narrower than the rise and fall times of the delay chain would allow. The *k*-th pulse to fire
(k = 0..SUB_LEN) rises `k*STEP_PS` after the clock edge.

The delays are analog in a real chip. Both modules are **behavioural models** with transport
delays (`#`). They simulate correctly, but synthesis drops the delays, so a synthesized top
level has a constant-zero pulse generator. Treat the generator as the specification of a
custom cell, and the latch array as the synthesizable part.

## Parameters and timing

| parameter  | default | origin |
|------------|---------|--------|
| `WORD_LEN` | 256     | published configuration |
| `SUB_LEN`  | 4       | published configuration |
| clock      | 200 MHz (5 ns) | published configuration (`pl_shift_pkg::CLK_PERIOD_PS`, used by the testbenches) |
| `STEP_PS`  | 500     | own choice |
| `WIDTH_PS` | 250     | own choice |

The defaults live in `rtl/pl_shift_pkg.sv`. `STEP_PS > WIDTH_PS` is asserted, which keeps the
pulses apart. At the defaults the train ends 4·500 + 250 = 2250 ps after the rising edge. That
is inside the 2.5 ns high phase of the 200 MHz clock. If you change the timing, keep
`SUB_LEN*STEP_PS + WIDTH_PS` below the high time of the clock, or pulses will fall outside the
high phase.

Interface of the top, `pulsed_latch_shift_register`:

- `clk`: system clock. The register shifts once per rising edge.
- `din`: serial input. It is sampled during the last pulse (Q1 of the first sub-register). Hold
  it steady from just after the rising edge until the pulse train is over (use the falling clock
  edge as the safe time). One inverter turns it into the differential pair for the first latch.
- `q[WORD_LEN-1:0]`: parallel content, valid from the end of the pulse train until the next
  edge. `q[0]` is the newest bit.
- `dout = q[WORD_LEN-1]`: serial output. A bit that enters in cycle *n* is on `dout` after the
  pulse train of cycle *n + WORD_LEN − 1*.

`sub_shift_register` asserts at every change that no two of its pulses are high at once. That
is the rule that keeps the latch chain free of races.

## Files

| file | content |
|------|---------|
| `rtl/pl_shift_pkg.sv` | shared defaults |
| `rtl/modified_ssaspl.sv` | differential pulsed latch |
| `rtl/clock_pulse_circuit.sv` | delay + AND pulse former (behavioural) |
| `rtl/delayed_pulse_gen.sv` | SUB_LEN+1 reverse-ordered, non-overlapping pulses (behavioural) |
| `rtl/sub_shift_register.sv` | SUB_LEN data latches + temporary latch |
| `rtl/pulsed_latch_shift_register.sv` | top: shared generator + WORD_LEN/SUB_LEN sub-registers |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_pulse_skew` |
| `tb/skewed_chain.sv` | test helper: sub-shift registers behind skewed pulse wires |

All files declare `timeunit 1ps; timeprecision 1ps;`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`, and it has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/pl_shift_pkg.sv tb/tb_pulsed_latch_shift_register.sv \
  --top-module tb_pulsed_latch_shift_register -Mdir obj -o sim
./obj/sim
```

Replace the testbench name for the other blocks. `--timing` is required, because the pulse
generator is built from delays.

What the testbenches check:

- `tb_pulsed_latch_shift_register` runs the top at its **default size** (256 bits, 200 MHz)
  for 818 cycles of random data. After each pulse train it checks all of `q` against a reference
  shift register. It checks that `dout` delivers each bit exactly `WORD_LEN − 1` cycles after the cycle it
  entered. It checks that every cycle's pulses arrive in the order T, 4, 3, 2, 1. It also counts
  bits handed across sub-register boundaries through the T latches and changes of the input,
  and fails if either count is zero.
- `tb_sub_shift_register` makes the pulses itself. It drives random noise on the input while
  Q1 is closed, so the test proves that a latch only takes what is present during its own pulse.
- `tb_delayed_pulse_gen` measures the start time, width and count of every pulse and checks
  that no two pulses overlap.
- `tb_clock_pulse_circuit` and `tb_modified_ssaspl` check their blocks on their own.
- `tb_pulse_skew` tests how much wire skew the scheme tolerates. One generator drives four
  16-bit chains (helper `tb/skewed_chain.sv`). In each chain the pulses reach sub-register *k*
  `k*SKEW_PS` late, and each pulse also gets a small delay of its own. Each sub-register is
  checked right after its own last pulse. Skews of 0, 300 and 1200 ps per sub-register must
  give exact data. At 3500 ps per sub-register, the temporary latch of sub-register *k* is
  overwritten before sub-register *k+1* reads it, and the test requires the data to go wrong.

## What is not modelled

- **Electrical behaviour.** Transistor sizing, power, area and the 1.8 V supply are outside
  RTL. The published power and area savings cannot be reproduced or checked with this code.
- **Pulse skew along the wires.** In a real layout the pulses reach distant sub-registers late.
  All five pulses of one sub-register arrive with nearly the same skew, and the pulse spacing
  must be larger than the skew differences within a sub-register. In the top, every
  sub-register receives the pulses at the same instant. Only `tb_pulse_skew` adds skew. The
  rule it exercises is that the skew between neighbouring sub-registers, plus
  `SUB_LEN*STEP_PS + WIDTH_PS`, must stay below one clock period.
- **Exact delay values.** The pulse spacing and width are placeholders chosen to fit 200 MHz,
  not characterised numbers.
- **The comparison designs** (a flip-flop shift register, the original 9-transistor latch, and
  one delay chain per latch) are not included.
