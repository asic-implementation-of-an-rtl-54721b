# Radix-2 FFT on reversible-logic arithmetic

This repository holds SystemVerilog for a radix-2 butterfly (R2B) FFT. Every adder,
subtractor and multiplier inside it is built from reversible logic gates. A reversible
gate has as many outputs as inputs, and its inputs can always be recovered from its
outputs: Feynman (controlled-NOT), Toffoli, Peres and Fredkin (controlled-swap) gates.
Outputs that a circuit does not need are called garbage outputs.

Two designs from the same source stand side by side in the top level `r2b_fft_top`:

1. **`FFT_8bit`**: an 8-point decimation-in-time (DIT) FFT and inverse FFT on 8-bit
   complex samples. It is purely combinational: three stages of radix-2 butterflies, each
   built from reversible multipliers, adders and subtractors.
2. **`fft_processor_5g`**: the datapath of a memory-based block-floating-point (BFP) FFT
   processor for OFDM. It has two ping-pong memory groups of 16 banks, a memory of block
   exponents, and a processing element: CORDIC rotation, alignment, a reversible
   butterfly, then scaling. The controller that sequences the FFT stages is not specified
   by the source, so its signals are ports.

The reversible structure is kept visible in the RTL: gates are instantiated one by one,
and the garbage outputs are left open. A synthesis tool flattens all of this to ordinary
logic. The reversible netlist is there to be read and checked; it does not save power on
a CMOS target.

## Reversible arithmetic cells

This is the least familiar part of the design, and everything else is built on it.

### RH(A/S): half adder and half subtractor in one cell (`rh_as`)

The cell has three lines: X, Y and an ancilla line `en` that must be tied to 1. Its
outputs are:

| output | value     | meaning                                |
|--------|-----------|----------------------------------------|
| `sd`   | X ⊕ Y     | sum of X+Y, and difference of X−Y      |
| `bout` | XY ⊕ Y    | borrow of X−Y (that is, ¬X·Y)          |
| `cout` | XY        | carry of X+Y                           |

The cell is a cascade of four gates:

1. NOT on the ancilla line.
2. A Toffoli gate adds X·Y onto the ancilla line, which now holds ¬en ⊕ XY.
3. A Feynman gate sets X ^= Y.
4. A Feynman gate sets Y ^= (ancilla line).

All 8 input patterns map to different outputs, so the cell is reversible. If `en` = 0,
the carry and borrow come out inverted.

### RF(A/S): full adder and full subtractor (`rf_as`)

The cell uses two RH cells:

- The first RH takes x and y.
- The second RH takes the first cell's sum and `cin`.

`cin` is the carry-in when adding and the borrow-in when subtracting. The sum bit and the
difference bit are the same (x ⊕ y ⊕ cin). Each full carry or borrow is the OR of the two
partial ones. The two partial carries can never both be 1, because c1 = 1 forces the
first sum to 0. The same holds for the two partial borrows. So each OR is built as an XOR,
with one Feynman gate, and the cell stays reversible.

### Word adder/subtractor (`rev_addsub`)

This is a ripple chain of RF cells. Each cell produces both a carry and a borrow. A
Fredkin gate per bit, controlled by `sub`, passes one of them to the next bit: the
controlled swap acts as a reversible multiplexer. The chain starts at 0. Subtraction is
therefore a true borrow chain, not "add the two's complement plus one". `co` is the carry
out when adding and the borrow out when subtracting.

### Array multiplier (`rev_mult`, unsigned N×N)

- **Partial products.** N² reversible ANDs, each a Peres gate with its third input tied
  to 0. The a<sub>j</sub> line runs through the Peres gates' pass-through outputs. Each
  b<sub>i</sub> is fanned out by a chain of Feynman gates with a 0 target, because a gate
  output may not fan out in reversible logic.
- **Row 1.** N−1 RH cells.
- **Rows 2 to N−1.** N−1 RF cells each, in carry-save form.
- **Final row.** A ripple row of 1 RH cell and N−2 RF cells.

In total the multiplier uses N half adders and N²−2N full adders: 8 and 48 for N = 8.

### Signed multiplier (`rev_smult`)

The FFT needs signed products, so this wrapper uses sign-magnitude:

1. Each operand becomes `0 ± x` through `rev_addsub`, with the sign bit as `sub`. The
   magnitude of −128 is 128, which still fits 8 unsigned bits.
2. `rev_mult` multiplies the two magnitudes.
3. A 2N-bit `rev_addsub` restores the sign of the product.

## 8-point FFT (`FFT_8bit`)

### Flow graph

```
x0 ─┐stage 1 (W8^0)  ┌ stage 2: butterfly_4input ┐ ┌ stage 3: butterfly_8in ┐
x4 ─┘ butterfly8 x4  │ lines (0,2) W8^0          │ │ lines (i, i+4) W8^i    │── X0..X7
x2 ─┐                │ lines (1,3) W8^2          │ │ i = 0..3               │   natural
x6 ─┘                │  (one group per half)     │ │                        │   order
 ...  (x1,x5) (x3,x7)
```

- The inputs enter in bit-reversed order: 0, 4, 2, 6, 1, 5, 3, 7. `fft_pkg::bitrev`
  does this wiring at elaboration.
- The outputs come out in natural order.
- The module names `butterfly8` (2-input butterfly), `butterfly_4input` and
  `butterfly_8in` are the ones used for this hierarchy in the source.

### One butterfly (`butterfly8`)

```
t  = W8^K · A1                 (four rev_smult products, one rev_addsub for the real
                                part, one for the imaginary part, then floor by 2^6)
B0 = sat8((A0 + t) >>> 1)      (rev_addsub)
B1 = sat8((A0 − t) >>> 1)      (rev_addsub)
```

`twiddle_gen` supplies W8^K as signed 8-bit values with 6 fraction bits:

| k | W8^k         | value in RTL       |
|---|--------------|--------------------|
| 0 | 1            | 64                 |
| 1 | 0.707−0.707j | 45 − 45j           |
| 2 | −j           | −64j               |
| 3 | −0.707−0.707j| −45 − 45j          |

When `inverse` = 1 the generator outputs the conjugate twiddles.

### Number format and scaling

The inputs and outputs are signed 8-bit real and imaginary parts. `f_re`/`y_re` are the
eight 8-bit sample and bin buses; `f_im`/`y_im` add the imaginary parts.

Each butterfly halves its result and saturates it to 8 bits. After three stages:

- **Forward** (`inverse` = 0): `y = DFT(f) / 8`.
- **Inverse** (`inverse` = 1): `y = IDFT(f)`, including the 1/N factor.

Truncation and the 45/64 approximation of 0.707 keep the results within about 3 LSB of
the exact values. Saturation only occurs in rare near-full-scale complex inputs; the
testbench builds one on purpose.

### Timing

There is no clock. The outputs settle after the ripple delay of three butterfly stages.
Each stage contains a multiplier and two levels of ripple adders, so the logic is deep.
For a clocked system, add registers around the module, or between the stage instances.

## BFP FFT processor datapath (`fft_processor_5g`)

```
 io_wdata (16×28b) ─►┌X┐─► group 1 ─┐┌X┐─► io_rdata (16×28b)
                     │ │─► group 2 ─┤│ │
                     └─┘            │└─┘─► processing element ─► write-back (in place)
 block exponents: two groups of 16×3 bits; PE reads 16×3 bits, writes back 1×3 bits
 processing element: CORDIC ─► aligning ─► reversible butterfly ─► scaling ─► register
```

### Word and memory format

- A word is 28 bits: a 14-bit real part and a 14-bit imaginary part (`bfp_pkg::cword_t`).
- Each memory group holds 256 words as 16 rows of 16 banks.
- Every bank is a single-port array. One access reads or writes a whole row, and read
  data appear one clock later.
- `swap` decides which group faces the I/O side and which faces the PE. A read returns
  through the crossbar setting of the cycle that issued it.
- `bfp_memory` keeps one 3-bit exponent per row. The value of a word is
  `part × 2^exponent`.

### Processing element, per row

1. **CORDIC unit.** 16 rotation-mode CORDICs multiply each word by W256^k, one index
   per lane. Each CORDIC uses 16 iterations, a 20-bit phase, a 180° pre-rotation and a
   constant gain correction of 19898/2^15. The error is within 2 LSB.
2. **Aligning unit.** The row is shifted right to the largest exponent in the group, so
   that every row processed in a stage shares one block exponent.
3. **Butterfly unit.** Eight butterflies, lane i with lane i+8, built from `rev_addsub`.
   Each output is one bit wider than its input.
4. **Scaling unit.** The smallest right shift (0 to 2) that fits every part into 14 bits
   is applied. The new exponent is the common exponent plus the shift. If it exceeds 7,
   it is held at 7 and `exp_ovf` is raised; the stored row is then clipped.

### Controller interface

The PE side works on one row in three cycles. The cycle is the clock after the signals
are applied:

| cycle | controller drives             | datapath does                              |
|-------|-------------------------------|--------------------------------------------|
| t     | `pe_rd`=1, `pe_addr`=r        | reads row r from the PE-side group          |
| t+1   | `tw_idx[16]` for row r        | row r and its exponents pass through the PE |
| t+2   | `pe_rd` must be 0             | `pe_wb`=1: result and new exponent are written back to row r |

An assertion checks that `pe_rd` is never high during a write-back, because the banks are
single-port. The I/O side can load one group or read it out while the PE works on the
other group.

### What this datapath does not do

It has no controller: there is no stage counter, address generator or twiddle schedule,
and the FFT length is not fixed. The PE pairs lanes i and i+8 of a single row, so a full
multi-stage FFT would also need a permutation of data between stages. The source does
not describe that either. The testbenches act as the controller for single passes.

## Where the design departs from its source, and its own choices

- **Half adder/subtractor cell.** The source describes this cell in words as a mix of
  reversible AND, OR and XOR gates with a multiplexer, a "resolver" and an OR gate. It
  also gives the cell's output equations. `rh_as` realises those equations with the
  four-gate cascade above. The multiplexer reappears as the Fredkin select in
  `rev_addsub`, and the OR as the XOR merge in `rf_as`. No resolver function is
  specified, so none is built.
- **Complex samples in the 8-point FFT.** The source shows one 8-bit bus per sample;
  imaginary ports were added.
- **Inverse pin.** `inverse` was added, because the source claims both the forward and
  the reverse transform.
- **Scaling.** Per-stage halving with saturation, and truncation of products, are this
  design's choices.
- **Order of operations.** The prose of the source says DIT adds before it multiplies by
  the twiddle. Its figures multiply first, the standard DIT order, and this design
  follows the figures.
- **Complex product.** It uses four real reversible multipliers; the source's drawing
  shows two.
- **Twiddle generator.** It is a four-entry constant table, not a sine-wave generator
  with an error-compensation table; for N = 8 only four values occur.
- **Clocking.** The source reports 3115 slice registers and 44 I/O pins for its 8-point
  FFT. This 8-point FFT has no registers and 257 I/O bits.
- **Processor details.** Row-wide access, one exponent per row, the CORDIC parameters,
  the alignment and scaling rules, the PE register stage and in-place write-back are all
  this design's own.

## Files

| file | contents |
|------|----------|
| `rtl/feynman_gate.sv`, `toffoli_gate.sv`, `peres_gate.sv`, `fredkin_gate.sv` | reversible gate primitives |
| `rtl/rh_as.sv`, `rf_as.sv`, `rev_addsub.sv`, `rev_mult.sv`, `rev_smult.sv` | reversible arithmetic |
| `rtl/fft_pkg.sv`, `twiddle_gen.sv`, `butterfly8.sv`, `butterfly_4input.sv`, `butterfly_8in.sv`, `FFT_8bit.sv` | 8-point FFT |
| `rtl/bfp_pkg.sv`, `sp_ram_group.sv`, `data_memory.sv`, `bfp_memory.sv`, `cordic_rotator.sv`, `cordic_unit.sv`, `aligning_unit.sv`, `pe_butterfly_unit.sv`, `scaling_unit.sv`, `processing_element.sv`, `fft_processor_5g.sv` | BFP processor datapath |
| `rtl/r2b_fft_top.sv` | top level with both designs |
| `tb/fft_ref_pkg.sv`, `tb/bfp_ref_pkg.sv` | reference models (integer flow graph, real-valued PE model) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench compares its module against values computed independently, in plain
integer or real arithmetic. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog.

- **Exhaustive tests.** The RH and RF cells are checked against their truth tables,
  including the reversibility of RH. `rev_addsub` is checked for all 8-bit operand pairs
  in both modes, and `rev_mult` and `rev_smult` for all 8-bit operand pairs.
- **Bit-exact FFT checks.** The butterflies and the 8-point FFT are compared bit-exactly
  with an integer model of the same fixed-point rules. The FFT is also compared against a
  floating-point DFT within 3 LSB, and checked with an impulse, a constant, a tone and
  forward/inverse round trips.
- **Processor units.** These are compared against real-valued models within the
  truncation tolerance. The memories are checked against shadow copies, including reads
  issued just before a swap.
- **End to end.** `tb_r2b_fft_top` runs the whole top at its default sizes. It sends two
  256-word blocks through the ping-pong memory and the PE, and runs the 8-point FFT
  tests. It counts each mechanism and fails if any never occurs:
  - forward and inverse transforms
  - butterfly saturation
  - round trips and non-trivial twiddles
  - group swaps and write-backs
  - alignment and scaling
  - exponent overflow
  - I/O traffic overlapping PE work

Each testbench was also run against a deliberately broken copy of its module, and it
reported failures every time.

Run any testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/fft_pkg.sv rtl/bfp_pkg.sv tb/fft_ref_pkg.sv tb/bfp_ref_pkg.sv \
  tb/tb_r2b_fft_top.sv --top-module tb_r2b_fft_top
./obj_dir/Vtb_r2b_fft_top
```

Replace `tb_r2b_fft_top` with any other `tb_<module>`. The end-to-end run takes about a
minute, mostly compile time.

## Changing the design

- The 8-point FFT's data and twiddle widths are the `DW` and `TW` parameters. The
  twiddle format always keeps TW−2 fraction bits. The flow graph itself is fixed at
  8 points.
- The processor sizes live in `bfp_pkg`: banks, part width, depth, exponent width and
  twiddle index width. The units take them as parameters.
- `rev_mult` works for any N ≥ 2. `rev_addsub` works for any width.
