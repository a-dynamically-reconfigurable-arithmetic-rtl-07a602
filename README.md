# Dynamically reconfigurable floating-point arithmetic unit

A complex multiply needs four real multipliers and two real adders. This circuit
starts from that set of units. It adds a divider and a rank of multiplexers, so the
same hardware can become a complex multiplier, a complex divider, six independent
real operations, two multiply-accumulate units, or a double-precision unit. A 3-bit
mode input, `sel`, picks the function. The multiplexer selects are decoded from `sel`,
so the function can change from one clock cycle to the next. The only cost is
reading new operands, and there is no reconfiguration pause.

Inside, the circuit has:

- two reconfigurable multipliers, each working as two single-precision multipliers
  or one double-precision multiplier;
- one reconfigurable adder, working as two single-precision adders or one
  double-precision adder;
- one single-precision divider;
- a decoder that turns `sel` into the multiplexer selects, the add/subtract flags
  and the precision switch;
- an output controller that puts the selected results on two 32-bit outputs.

All values are IEEE754 single (32-bit) or double (64-bit) words.

## Modes

The twelve 32-bit inputs are called `a`..`l`. A double operand is a pair of inputs,
high word first: A = {a,b}, B = {c,d}, C = {e,f}, D = {g,h}, E = {i,j}, F = {k,l}.

| sel | function | results, per `sel2` step (`calc_out1`, `calc_out2`) |
|-----|----------|-------------------------------------------------------|
| 000 | complex multiply (a+jb)(c+jd) | 00: ac−bd, bc+ad |
| 001 | six parallel single operations | 00: ab, cd · 01: ef, gh · 10: i+j, k+l |
| 010 | two MACs of type a·b+c, plus a·b·c | 00: ab+c, ef+g · 01: abc, 0 |
| 011 | two MACs of type a·b+c·d | 00: ab+cd, ef+gh |
| 100 | complex divide, real part | 00: (ac+bd)/(c²+d²), 0 |
| 101 | complex divide, imaginary part | 00: (bc−ad)/(c²+d²), 0 |
| 110 | three parallel double operations | 00: A·B · 01: C·D · 10: E+F (each as a high word, low word pair) |
| 111 | double MAC | 00: A·B+C·D (high word, low word) |

Any `sel2` step a mode does not use reads as zero.

### How each mode is routed

Call the four multiplier lanes m1..m4 and the two adder lanes s1, s2:

- Block R computes m1 = r1·r2 and m2 = r3·r4.
- Block L computes m3 = l1·l2 and m4 = l3·l4.
- The adder computes s1 = in1 ± in2 and s2 = in3 ± in4.
- The divider always computes s1 / s2.

Each of the twelve multiplexers (r1..r4, l1..l4, adder in1..in4) has two to four
inputs. The decoder drives them with an 18-bit select word; its field layout is
`drac_pkg::mux_sel_t`.

| sel | m1 | m2 | m3 | m4 | s1 | s2 |
|-----|----|----|----|----|----|----|
| 000 | a·c | d·b | c·b | d·a | m1−m2 | m3+m4 |
| 001 | a·b | c·d | e·f | g·h | i+j | k+l |
| 010 | a·b | (unused) | e·f | c·m1 | m1+c | m3+g |
| 011 | a·b | c·d | e·f | g·h | m1+m2 | m3+m4 |
| 100 | a·c | d·b | c·c | d·d | m1+m2 | m3+m4 |
| 101 | b·c | d·a | c·c | d·d | m1−m2 | m3+m4 |
| 110 | A·B (block R) | | C·D (block L) | | E+F (double) | |
| 111 | A·B (block R) | | C·D (block L) | | A·B+C·D (double) | |

In mode 010, the product a·b from lane m1 feeds lane m4 directly in the same cycle,
so three operands are multiplied without a register. Both division modes keep the
divisor c²+d² on lane s2, so the divider's inputs need no multiplexer.

## Arithmetic conventions

- **Rounding.** The adder and the multipliers round towards zero, in both
  precisions. The divider rounds to nearest, ties to even.
- **Subnormals.** There are none. A subnormal input is read as zero. A result below
  the normal range becomes a zero with the result's sign.
- **Overflow.** Overflow gives infinity, also under truncation. This is a choice
  made here: strict IEEE754 round-towards-zero would give the largest finite number.
- **NaN.** Every NaN result is the quiet NaN `7FC00000` (single) or
  `7FF8000000000000` (double).
- **Infinities and zeros.**
  - inf − inf, 0·inf, 0/0 and inf/inf give NaN.
  - x/0 gives infinity.
  - x − x gives +0.

## The double-precision multiplier: three clock cycles per product

This is the only part of the arithmetic with timing. In single mode each multiplier
block is two combinational 24×24 significand multipliers. In double mode
(`accuracy` = 1), the 53×53 significand product is built over three cycles:

- B's 53-bit significand is split into three 18-bit portions.
- Each cycle multiplies A's full significand by one portion (a 53×18 product).
- That partial product is shifted and added into a 106-bit accumulator.

A free-running 3-phase counter runs while `accuracy` is 1:

- **Phase 0** captures the operands from the inputs and starts the accumulator.
- **Phase 1** adds the second partial product.
- **Phase 2** adds the third, normalises, truncates, writes the result register
  and pulses `dp_valid` for one cycle.

Timing:

- A new double product appears every three cycles.
- The double outputs hold their value between updates.
- Each product reflects the operands present at its phase-0 edge. If operands
  change mid-group, the first `dp_valid` pulse may still carry the old product.
  The second pulse is always correct, at most 6 cycles after the change.
- Leaving double mode resets the counter to phase 0. Entering double mode therefore
  starts a group on the operands already present, and the first pulse is then
  already valid. The system sequencer still waits for the second pulse.
- In mode 111 the sum A·B+C·D goes through the adder combinationally from the two
  registered products. It is valid whenever they are.

All single-precision modes are combinational from `din`/`sel`/`sel2` to
`calc_out1`/`calc_out2`. The divider is an unrolled 27-step restoring array, so
mode 100/101 is the longest combinational path: multiply, then add, then divide.

## The reconfigurable adder

In double mode the adder takes A = {in1,in2} and B = {in3,in4}, and returns the
sum as {out1,out2}. Its two lanes are built unequally:

- **Lane 1** is a double-width datapath. In single mode it works on single operands
  converted to double. The conversion is exact, and the result is truncated back to
  single. This gives exactly the single-precision truncated sum, because every
  single value is also a double value, and truncating on a fine grid then on a
  coarser grid nested in it equals truncating once on the coarser grid.
- **Lane 2** is a plain single-precision datapath.

One datapath therefore serves both as one of the two single adders and as the
double adder.

## Host-side system (`drac_system`)

On the board the circuit sits behind a selection register, an input buffer and an
output buffer, and a host processor fills and empties them. `drac_system` provides
these three parts on a simple word bus:

| address | write | read |
|---------|-------|------|
| 0–11 | operand a..l | operand a..l |
| 12 | `sel` in bits [2:0]; starts a run | status: bit 0 `done`, bit 1 `busy`, bits [6:4] `sel` |
| 16–21 | — | results out1..out6 |

Bus and run behaviour:

- `cpu_rdata` is registered: it shows the addressed word one cycle after the address.
- A run first waits for valid results: one cycle in single modes, the second
  `dp_valid` pulse in double modes.
- It then steps `sel2` through 0, 1, 2 and stores each output pair into
  out(2k+1), out(2k+2).
- Writes that arrive during a run are ignored.
- A run takes 4 cycles in single modes and at most 10 in double modes.
- `rst_n` is an active-low asynchronous reset everywhere.

## How far it can be trusted

Every block has a self-checking testbench. Each testbench compares the block against
a reference in `tb/fp_ref_pkg.sv`. The reference computes exact results with wide
integers rather than with guard/round/sticky bits, so it does not share the
hardware's method. The numbers below are the check counts of each run.

- **Adder core, single and double:** 8,014 checks, random and special cases.
- **Reconfigurable adder:** 9,009 checks.
- **Multiplier:** 3,626 checks. They include the three-cycle `dp_valid` spacing and
  the latency bound.
- **Divider:** 20,011 checks.
- **Decoder and output controller:** exhaustive over all `sel`/`sel2` values.
- **Core:** 13,288 checks, covering all eight modes in random order with back-to-back
  mode changes.
- **System, end to end:** 1,302 checks through the bus. It counts each mechanism and
  fails if any never happened: every mode, mode switches, double-precision waits,
  three-pair runs, overflow, NaN, and ignored writes.

The published example inputs are also run, and the results agree with the published
ones:

- **Single precision, a..l:** the printed products, sums, MAC results, complex
  product and complex quotient agree to one unit in the last place or better.
- **Board read-out for g·h and k+l:** agrees exactly (`4269B219`, `447D6522`). The
  published simulation waveform shows both words one unit higher, which suggests a
  different rounding there.
- **Double-precision simulation (mode 110):** the printed 64-bit results agree to
  one unit in the last place. Mode 111 gives A·B+C·D = `41D2CEB8 E0C3CB3B`.
- **Board double run (mode 110 on the second input set):** agrees to one unit in
  the last place:

  | result | high word | low word |
  |--------|-----------|----------|
  | A·B | `41017385` | `089F7F2B` |
  | C·D | `410F6B6D` | `C64D1DBE` |
  | E+F | `40C5A192` | `279114D9` |

What is not verified:

- Timing closure. The divider path is long, and no timing analysis was done.
- Synthesis results on any FPGA.

## Where this differs from, or goes beyond, the published design

- **Adder.** The published adder joins two single adders into one double adder, but
  does not say how. Here, lane 1 is a double datapath that also does single work
  (see above).
- **Multiplexers.** Only the multiplexer structure, the 3-bit `sel`, the 18-bit
  select word and the mode list are given. Which operand each multiplexer passes is
  this design's own routing.
- **Divider multiplexers.** The published block diagram has two multiplexers in
  front of the divider. They are left out, because both division modes here keep
  the numerator on s1 and the denominator on s2.
- **Mode 101 sides.** The published text puts the denominator on the left-hand
  units in both division modes, and that is what this design does. One of the
  published connection diagrams draws mode 101 with the sides swapped.
- **Double multiplier.** The published design says only that the double multiply
  takes three portions over the clock. The 18-bit portions, the phase counter and
  `dp_valid` are this design's.
- **Output order.** The order of results over `sel2`, and the zero for unused
  steps, were read from the published waveforms and board read-out, as far as these
  show them.
- **Host-side system.** The bus, address map and sequencer of `drac_system` are
  this design's own. The published design names only the register and the two
  buffers.
- **Overflow and NaN.** Overflow to infinity and the fixed quiet-NaN encoding are
  this design's choices within the published list of exceptions.
- **Not included.** The host processor, the PC, and its decimal↔binary conversion.
  The system's bus ports stand in for the processor.

## Files

| file | contents |
|------|----------|
| `rtl/drac_pkg.sv` | modes, mux-select layout, single↔double conversion helpers |
| `rtl/fp_add_core.sv` | parameterised adder/subtracter, round towards zero |
| `rtl/fp_mul_norm.sv`, `rtl/fp_mul_comb.sv` | multiplier normalisation stage; combinational multiplier |
| `rtl/drac_adder.sv` | reconfigurable single/double adder |
| `rtl/drac_multiplier.sv` | reconfigurable single/double multiplier (3-cycle double) |
| `rtl/fp_div_sp.sv` | single-precision restoring divider, round to nearest even |
| `rtl/drac_decoder.sv` | `sel` → mux selects, `pmflg`, `accuracy` |
| `rtl/drac_outctrl.sv` | output controller |
| `rtl/drac_core.sv` | the reconfigurable circuit |
| `rtl/drac_system.sv` | top: circuit with register, input and output buffers |
| `tb/fp_ref_pkg.sv` | reference arithmetic and per-mode expected results |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. A
watchdog ends it with a failure if it hangs. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/drac_pkg.sv tb/fp_ref_pkg.sv \
  rtl/fp_add_core.sv rtl/drac_adder.sv rtl/fp_mul_norm.sv rtl/fp_mul_comb.sv \
  rtl/drac_multiplier.sv rtl/fp_div_sp.sv rtl/drac_decoder.sv rtl/drac_outctrl.sv \
  rtl/drac_core.sv rtl/drac_system.sv tb/tb_drac_system.sv \
  --top-module tb_drac_system -o sim
./obj_dir/sim
```

To run another testbench, swap in its `tb/tb_<module>.sv` and `--top-module`. Each
one needs only the files of its module and the modules below it. The design has no
size parameters to scale. The testbenches run in seconds.
