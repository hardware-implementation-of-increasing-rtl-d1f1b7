# Golay (23,12,7) / (24,12,8) encoder and decoder

The binary Golay code protects 12 data bits with 11 check bits and corrects
any three bit errors in the 23-bit word. Adding one overall parity bit gives
the extended Golay code (24,12,8), whose minimum distance of 8 lets a decoder
correct three errors and detect four. This RTL has three parts:

* an **encoder** that works out the 11 check bits by polynomial long division.
  It does not use a linear feedback shift register, which moves one bit per
  clock and needs 23 clocks. Each clock does a whole division step and skips
  every leading zero at once, so a codeword is ready in at most 12 clocks;
* a **G23-to-G24 converter** that appends the parity bit;
* a pipelined **decoder** for the extended code. It uses the incomplete
  maximum-likelihood decoding rule (IMLD), built from parallel weight counters,
  and accepts one 24-bit word per clock.

All of it is plain synthesizable SystemVerilog with no vendor primitives.

## The encoder: long division that skips zeros

The check bits are the remainder of `P(x) = M(x)·x^11` divided by the
generator polynomial `G(x)`. By default `G(x) = x^11+x^10+x^6+x^5+x^4+x^2+1`
(`12'hC75`). The other generator of the code, `x^11+x^9+x^7+x^6+x^5+x+1`
(`12'hAE3`, `golay_pkg::GEN_POLY_ALT`), can be chosen through the `GPOLY`
parameter.

`golay_encoder` holds the 23-bit dividend in a working register. The
"window" is the register's top 12 bits, `[22:11]`, and `G(x)` lines up under
it. A 4-bit counter, R7, holds how many places the divisor may still move to
the right. It starts at 11, one place per appended zero. Each clock does this:

1. **Controlled subtraction.** If the window starts with a one, `G(x)` is
   XORed onto it. This is the modulo-2 subtraction of long division.
2. **Leading-zero count.** A 12-input priority encoder (`prio_enc12`) counts
   the zeros at the top of the window. The count can be 0 to 12.
3. **Shift.** The shift amount is that count, capped at R7. A 23-bit
   rotator (`circ_shift23`) turns the result left by this amount. The bits it
   wraps around are leading zeros, so the rotation acts as a left shift.
4. **Count.** The shift amount is subtracted from R7.

When R7 is zero, the window sits over the last 12 dividend bits. The step
taken in that state leaves the 11-bit remainder in window bits `[21:11]`. The
remainder is loaded into R3 (`check`) and `{message, remainder}` into R6
(`cw23`), and `done` pulses.

A 2:1 multiplexer in front of the subtractor picks the new message in the
cycle `start` is accepted, so the first step happens in that cycle. Every
step before the last one shifts by at least one place. The work therefore
takes at most 11 shifting steps and one final step, which is 12 clock edges
counting the start edge. Messages with long runs of zeros finish sooner: the
all-zero message takes 2 cycles. Over all 4096 messages the latency ranges
from 2 to 12 cycles. Only 4 messages need the full 12 cycles with the default
polynomial.

Here is one message, `101001110010`, with the default polynomial. The
register is shown before the step, then after the XOR:

| cycle | register before | after XOR | zeros | shift | R7 |
|---|---|---|---|---|---|
| 1 (start) | `10100111001 000000000000` | `01100000011 100000000000` | 1 | 1 | 11→10 |
| 2 | `11000000111 000000000000` | `00000111101 100000000000` | 5 | 5 | 10→5 |
| 3 | `11110110000 000000000000` | `00110001010 100000000000` | 2 | 2 | 5→3 |
| 4 | `11000101010 000000000000` | `00000010000 100000000000` | 6 | 3 (cap) | 3→0 |
| 5 (done) | `00010000100 000000000000` | no XOR | – | – | 0 |

The check bits are `00100001000`.

Interface: `start` is ignored while `busy` is high. `check` and `cw23` hold
their values until the next codeword is finished. Layout:
`cw23[22:11] = message` (bit 22 is the coefficient of x^22) and
`cw23[10:0] = check bits`.

## From 23 to 24 bits

`g23_to_g24` appends the parity bit that makes the total weight even.

* **First edge.** Register R9 takes the weight of the 23-bit word. The
  weight comes from two 12-bit weight units and an adder. A copy of the word
  is held in the same edge.
* **Second edge.** A 2:1 multiplexer steered by `R9[0]` loads R10 with the
  word followed by 0 or by 1.

So `cw24 = {cw23, parity}`, valid two cycles after its input. In
`golay_top`, the encoder's `done` pulse drives the converter.

## The decoder: IMLD with two syndromes

The decoder works on the extended code in systematic form, with generator
`G = [I | B]`. B is the 12×12 matrix in `golay_pkg::B_ROWS`. B is symmetric
and `B·B = I`, and the decoder depends on this. The received word is
`w = (w1, w2)`, with `w1 = rx[23:12]` and `w2 = rx[11:0]`. The decoder
computes two syndromes:

* `s = w1 + w2·B`. If the errors are `(e1, e2)`, then `s = e1 + e2·B`.
* `sB = s·B`. This equals `e1·B + e2`.

If all errors lie in one half, one of the syndromes is the error itself. If
exactly one error lies in the other half, at position i, adding row `b_i` of
B removes it. The first test that passes sets the error pattern `u`:

| test | error pattern `u` | `path` |
|---|---|---|
| weight(s) ≤ 3 | `(s, 0)` | `PATH_S` |
| weight(s + b_i) ≤ 2 for some i | `(s + b_i, e_i)` | `PATH_S_BI` |
| weight(sB) ≤ 3 | `(0, sB)` | `PATH_SB` |
| weight(sB + b_i) ≤ 2 for some i | `(e_i, sB + b_i)` | `PATH_SB_BI` |
| none | 0, `uncorrectable` = 1 | `PATH_UNCORR` |

`e_i` is the 12-bit unit vector for row i. Row 0 of B is bit 11. Any pattern
of up to three errors is corrected. With four errors, every codeword is at
least four bits away, so no test passes and the word is flagged
uncorrectable. It then leaves the decoder unchanged.

The "some i" tests are done by `sel_unit`:

* It forms the twelve candidates `v ^ b_i` in parallel.
* A `weight_unit12` counts the ones of each candidate, and each count is
  compared with 2.
* A 12:1 priority encoder (`prio_enc12`) picks the first row that passes.
* A 13:1 multiplexer delivers that candidate. Its thirteenth input is zero,
  meaning no row matched.

The decoder has two of these units, one for `s` and one for `sB`.

The pipeline takes one word per clock and has a latency of 4 cycles:

| edge | work |
|---|---|
| 1 | input register |
| 2 | syndrome `s` (`golay_syndrome`) |
| 3 | weight(s) and the s-selection unit; `sB = s·B` |
| 4 | weight(sB) and the sB-selection unit; choice of `u`; `corrected = w ^ u` registered |

## Weight measurement unit

`weight_unit12` counts the ones of a 12-bit word in a three-level adder
tree:

1. Four full adders each add three input bits into a 2-bit count.
2. Two adders each add two of those counts into a 3-bit count.
3. A 3-bit adder adds the two 3-bit counts into the 4-bit weight.

The tree is shallow, and it sets the critical path of the decoder's
selection stages. The design uses 26 of these units: 24 in the two selection
units, one each for weight(s) and weight(sB). The converter adds two more.

## The two forms of the code

The encoder produces the **cyclic** form of the code: the `G(x)` remainder
plus parity. The decoder expects the **systematic** `[I | B]` form. Both are
(24,12,8) Golay codes and are equivalent up to a reordering of bit positions,
but they are not the same set of words. Only 32 of the 4096 encoder outputs
are `[I | B]` codewords. `golay_top` therefore puts the encoder chain and the
decoder side by side, each with its own ports, and does not loop one into the
other. To build a matched codec, change one side:

* replace the decoder's B with the check matrix of the cyclic code; or
* encode systematically as `{m, m·B}`. `golay_pkg::mul_b` computes `m·B`.

## Where this RTL departs from the original architecture, or fills gaps

* **Decoder latency.** The original design reports a decoder latency of 27
  cycles at one word per clock. How those stages are divided is not known.
  This RTL has the same throughput and a latency of 4 cycles.
* **Decoder tests.** The weight ≤ 3 tests on `s` and `sB`, and the handling
  of four or more errors, are the standard IMLD rule. The original
  description gives only the weight ≤ 2 selection in detail.
* **Weight unit.** The second level of the weight unit is drawn as half
  adders. Each block there must add two 2-bit counts, so they are written as
  2-bit adders.
* **Parity bit.** The parity bit is chosen by bit 0 of the weight register
  R9 and is appended at the LSB end.
* **Encoder cap.** The last shift of the division is capped at the R7 count,
  so the window ends exactly on the last dividend bit.
* **Choices of this design.** The following are not taken from the original
  design: all handshakes (`start/busy/done`, `in_valid/out_valid`), the
  synchronous active-low reset `rst_n`, bit ordering, the `path` output, and
  the 23-bit weight built from two 12-bit units.

The original design was implemented on a Xilinx Virtex-4 FPGA, with the
encoder reported at about 238 MHz and the decoder at about 195 MHz. This RTL
has not been timed on any device.

## Verification

Each module has a self-checking testbench in `tb/`. The expected values come
from the independent models in `tb/golay_ref_pkg.sv`: bit-serial long
division, column-by-column products with B, and plain bit counting.

* `tb_prio_enc12`, `tb_weight_unit12`: exhaustive over all 4096 inputs.
* `tb_circ_shift23`: random words, every shift amount.
* `tb_golay_syndrome`: all 4096 codewords give a zero syndrome. Words with
  errors give `e1 + e2·B`.
* `tb_sel_unit`: rows of B with 0 to 3 flips, plus random vectors.
* `tb_golay_encoder`: all 4096 messages with both polynomials. Checks the
  latency (at most 12, and 12 reached) and that `start` is ignored while
  busy.
* `tb_g23_to_g24`: random stream with gaps. Checks the parity, the 2-cycle
  latency and both parity values.
* `tb_golay24_decoder`: 20 000 words with 0 to 4 random errors. Checks that
  up to three errors are corrected, that four are flagged uncorrectable, the
  4-cycle latency, and that every path occurs.
* `tb_golay_top`: the whole design at default parameters. It runs the
  encoder over all messages and streams the decoder at the same time. It
  counts each mechanism and fails if one never happens: early finish, the
  full 12-cycle division, an ignored start, both parity values, and all five
  decoding paths.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_golay_top \
    -y rtl -y tb +libext+.sv rtl/golay_pkg.sv tb/golay_ref_pkg.sv tb/tb_golay_top.sv
./obj_dir/Vtb_golay_top
```

Replace `tb_golay_top` with any other testbench name to run that test. The
packages must come first on the command line. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/golay_pkg.sv rtl/<module>.sv`.

## Files

| file | contents |
|---|---|
| `rtl/golay_pkg.sv` | generator polynomials, matrix B, `mul_b`, decoder path enum |
| `rtl/golay_encoder.sv` | zero-skipping division encoder (R3, R6, R7) |
| `rtl/prio_enc12.sv` | 12-input priority encoder / leading-zero counter |
| `rtl/circ_shift23.sv` | 23-bit left rotator |
| `rtl/g23_to_g24.sv` | parity extension (R9, R10) |
| `rtl/weight_unit12.sv` | 12-bit ones counter |
| `rtl/golay_syndrome.sv` | syndrome `s = w1 + w2·B` |
| `rtl/sel_unit.sv` | search for `b_i` with weight(v + b_i) ≤ 2 |
| `rtl/golay24_decoder.sv` | 4-stage IMLD decoder |
| `rtl/golay_top.sv` | encoder chain and decoder side by side |
| `tb/golay_ref_pkg.sv` | reference models for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |
