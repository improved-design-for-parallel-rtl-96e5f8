# Serial radix-4 Booth multiplier after the Phase-Mode SFQ design

This is a signed 8 × 8-bit parallel multiplier. It builds its partial products with
radix-4 Booth encoders instead of an AND array. The architecture comes from a
superconducting single-flux-quantum (SFQ) design in *Phase-Mode* logic. That design
had two aims:

* Cut the wiring needed to fan the operands out to n² AND cells.
* Let the fast, pipelined Booth encoder do several encodings while the slower
  carry-save adder (CSA) does one.

Each encoder is therefore used *serially*. Two encoders each produce two partial products
per multiplication, over two cycles. The CSA and the carry-lookahead adder (CLA) take all
four partial products once per two cycles, so the encoders run at twice the adders' rate
(20 GHz against 10 GHz in the SFQ circuit).

The RTL here is ordinary synchronous SystemVerilog. It keeps the logical structure of that
design and models its basic storage cell, the *extended AND gate*, as a clocked cell. It
makes no attempt to model the Josephson-junction circuits, their timing or their layout.

Two ways of lining up the serially produced partial products were proposed. Both are built
and sit side by side in the top level:

| organisation | what moves by two bits per serial step | module |
|---|---|---|
| input shift  | the multiplicand, ahead of the encoder | `booth_mult_in_shift` |
| output shift | the partial product *and* its complementary bit, behind the encoder | `booth_mult_out_shift` |

## Booth recoding and the encoder's four control signals

The two's complement multiplier Y is read as N/2 digits. Each digit
d<sub>k</sub> = −2·y<sub>2k+1</sub> + y<sub>2k</sub> + y<sub>2k−1</sub> (with y<sub>−1</sub> = 0)
lies in {−2, −1, 0, +1, +2}. So X·Y = Σ d<sub>k</sub>·X·4<sup>k</sup>, and each partial
product is 0, ±X or ±2X.

The encoder does not form the digit as a number. Its first block (`booth_first_block`)
turns the three bits into four control lines:

| y(i+1) y(i) y(i−1) | digit | "+1" | "+2" | "−" | "−2" |
|---|---|---|---|---|---|
| 000, 111 | 0  | | | | |
| 001, 010 | +1 | ● | | | |
| 011      | +2 | ● | ● | | |
| 100      | −2 | | | ● | ● |
| 101, 110 | −1 | | | ● | |

"+1" is raised only for positive digits. A negative digit, and digit 0, leaves the
multiplicand on the *minus path*.

## Inside the encoder: steering, inversion, complementary bit

This is the part that is least like a conventional Booth multiplexer.

**Extended AND gate** (`ext_and_gate`). This is a one-bit cell.
* A pulse on Y stores a flux quantum.
* A pulse on X while it is stored is passed to B (X·Y = B).
* A pulse on Re while it is stored is passed to C (Y·Re = C).
* Either read empties the cell. X or Re at an empty cell does nothing.

Here a pulse is a one-cycle high level. Pulses arriving in the same cycle are taken in the
order Y, X, Re. If Re is pulsed every cycle, as the encoder does, the cell becomes a
one-cycle steering switch: Y goes to B when X is present and to C otherwise.

**Second block** (`booth_second_block`). Three such gates per multiplicand bit x<sub>i</sub>:

```
gate 1  Y = x_i   X = "+1"  ->  B: plus path      C: minus path
gate 2  Y = plus  X = "+2"  ->  B: +2x_i          C: +x_i
gate 3  Y = minus X = "-2"  ->  B: +2x'_i         C: +x'_i
```

Each set bit of X ends up on exactly one of four lines. The "2x" lines are re-indexed one
position up, which is the ×2.

**Third block** (`booth_third_block`). For partial-product bit j, it merges
+x<sub>j</sub> with +2x<sub>j−1</sub>, and +x'<sub>j</sub> with +2x'<sub>j−1</sub>. Then:

p<sub>j</sub> = plus<sub>j</sub> ∨ ("−" ∧ ¬minus<sub>j</sub>)

So the minus path is inverted when "−" is present and blocked otherwise. This is why digit 0
gives 0 even though X sits on the minus path.

**Result.** For a negative digit the encoder emits the one's complement of |d|·X. It also
emits the "−" line as the **complementary bit** `cn`, the +1 that completes the two's
complement. So for every digit, `pp + cn = d·X`. The multiplicand is sign-extended to W+2
bits first, so that even −2 × (most negative X) fits. The CSA adds `cn` at the right
weight.

**Pipeline.** `booth_encoder` is two register stages: the decoded control lines, then the
partial product. It takes one digit per cycle, whatever its width.

## Input shift versus output shift: where the complementary bit goes

Encoder e handles digits e·S … e·S+S−1, one per cycle. Its words are placed at bit 2·S·e.
For N = 8, E = 2 and S = 2, encoder 0 reads y₋₁…y₃ and encoder 1 reads y₃…y₇.

* **Input shift.** `input_shifter` multiplies X by 4<sup>s</sup> before step s, so the
  encoder must be N + 2(S−1) bits wide.
  * The zeros shifted in at the bottom are inverted along with the rest of a negative
    word. So ¬(X·4<sup>s</sup>) + 1 still needs its +1 at the encoder's *base* bit, not at
    bit 2s.
  * Both steps of one encoder therefore put their `cn` at the same position. They are
    collected as S separate rows (E·S + S rows into the CSA).
* **Output shift.** The encoder is only N + 2 bits wide. `output_shifter` shifts the word
  *and* the `cn` bit by 2s afterwards.
  * Zeros enter below a shifted word, so each `cn` must move with it, to bit 2d of its digit.
  * All complementary bits then land on distinct positions and fit one row (E·S + 1 rows).

Swapping these rules breaks the result. The broken copies used to test the testbenches
include exactly that swap.

## Frames, rates and timing

One clock drives everything. A free-running step counter cuts time into *frames* of
S cycles.

* `in_ready` is high in the last cycle of each frame. A pair taken then (`in_valid &&
  in_ready`) is encoded during the next frame, one serial step per cycle, in all encoders
  at once.
* Partial products are collected over the frame. The CSA register and then the product
  register are enabled once per frame, which models the adders running at 1/S of the
  encoder rate.
* **Throughput:** one product per S cycles, which is 2 at the defaults.
* **Latency:** ENC_LATENCY + S + 2 = **6 cycles**. It runs from the edge that accepts the
  pair to the edge that raises `out_valid`. The stages are: operand register, two encoder
  stages of the last step, frame collector, CSA register, product register.
* There is no output back-pressure. Reset is synchronous and active low, and clears all
  state and valid flags.

The top (`pm_booth_mult_top`) feeds one operand stream to both organisations:
* `in_ready` is the AND of the two.
* Each organisation returns its own product: `a_valid`/`a_p` for input shift,
  `b_valid`/`b_p` for output shift.
* Both have the same latency and rate.

## Carry-save and carry-lookahead blocks

`csa_tree` reduces the rows (partial products sign-extended to 2N bits, plus the
complementary-bit rows) to a sum and a carry word. It is a tree of (3,2) counter rows
(`csa_row`, `full_adder`). The number of words per level is computed at elaboration, so any
row count works.

`cla_adder` adds the two words with two-level carry lookahead: 4-bit groups with full
lookahead inside, and a lookahead over group generate and propagate. All arithmetic is
modulo 2<sup>2N</sup>, which is exact for an N × N signed product.

The SFQ original feeds its full adders bit-serially through merge cells. The tree and the
adder structure here are ordinary synchronous choices of this implementation.

## Parameters

Shared constants are in `pm_mult_pkg` (`N_BITS = 8`, `N_ENCODERS = 2`, `N_SERIAL = 2`,
`ENC_LATENCY = 2`, `CLA_GROUP = 4`), together with the `booth_ctl_t` struct of the four
control lines. The top and both multipliers take `N`, `E` and `S`, and need N = 2·E·S (an
initial assertion checks it). Sizes 4, 8, 16, 32 and 64 bits have been simulated; the
2- and 128-bit word lengths have not. `booth_encoder`'s own default `W = 2` is the 2-bit
encoder of the original study; the multipliers set it.

## What follows the original design and what does not

Taken from the original design:
* the Booth table and the four control lines;
* the three-block encoder, with the second block built from extended AND gates;
* the one's-complement-plus-complementary-bit scheme;
* two serial encoders per 8-bit multiplier;
* the two shift organisations;
* the CSA-then-CLA back end and the 2:1 rate ratio.

This implementation's own choices:
* a synchronous single-clock model of pulse logic, with a frame counter for the rate ratio;
* the gate-level structure of the first block, which is written from the Booth table;
* two's complement X as well as Y;
* the encoder's pipeline depth and sign extension;
* the valid/ready handshake;
* the CSA tree shape and the CLA group size.

Not modelled at all:
* the Josephson-junction circuits, device values and layout;
* the >30 GHz timing and the gate and junction counts.

Lint notes that remain:
* Unused bits are left over by construction: the top carry of a CSA row, the top "+2"
  lines, the "−" input of the second block, the CLA carry-out and the second encoder's
  valid.
* Bit 0 of a carry word is always 0.

## Files

`rtl/` holds one unit per file:

```
pm_booth_mult_top
├── booth_mult_in_shift   (input_shifter, booth_encoder, csa_tree, cla_adder)
└── booth_mult_out_shift  (booth_encoder, output_shifter, csa_tree, cla_adder)
booth_encoder = booth_first_block + booth_second_block (3 × ext_and_gate per bit) + booth_third_block
csa_tree = csa_row = full_adder
```

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_pm_booth_mult_sizes.sv` (the word-length sweep).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Run one
with Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_pm_booth_mult_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/pm_mult_pkg.sv tb/tb_pm_booth_mult_top.sv -o sim
./obj_dir/sim
```

Swap in any other `tb_*` name. `tb_pm_booth_mult_top` runs the top at its default
parameters:
* It multiplies all 65 536 operand pairs in both organisations, with random idle cycles.
* It checks every product and its arrival cycle.
* It counts how often each mechanism occurred: each digit value, complementary bits, both
  serial steps, input and output shifts, back-to-back and idle frames, and CSA/CLA updates.
  It fails if any count is zero.

The per-module testbenches are exhaustive where the input space is small (the Booth table,
the shifters, the 2-bit encoder) and random elsewhere. The multiplier testbenches also
check the 6-cycle latency and the one-pair-per-frame rate. A simulation takes well under
a second.
