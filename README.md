# 32-point 4-parallel feedforward FFT with allocated rotators and radix-8 Booth multipliers

This is a streaming FFT processor. It takes four complex samples per clock beat and computes a
32-point FFT every 8 beats. FFTs can follow each other with no gap. It is a radix-2,
decimation-in-frequency, multi-path delay commutator (MDC, also called feedforward) pipeline with
five stages.

Its main idea is *rotator allocation*. In a parallel pipelined FFT, a radix-2 butterfly only needs
its two inputs to differ in one index bit, b(n-s) at stage s. Every other index bit can be made
either *serial* (it picks the clock beat the sample travels in) or *parallel* (it picks the path
that carries it). Each choice changes which twiddle factors meet on the same path. The design
picks the split at each stage so that each rotator sees few distinct angles. Some paths then need
no rotator at all, some only a trivial rotation by -j, and the rest only small coefficient tables.
The general rotators are complex multipliers. Each is built from four radix-8 modified Booth
multipliers with a Wallace tree and a carry look-ahead adder.

## Index layout: the part to understand first

A sample's FFT index is I = b4 b3 b2 b1 b0. At every stage, three bits give the beat number t
(0..7) and two give the path number p (0..3):

| stage | serial bits, t = (MSB..LSB) | path bit 0 | path bit 1 | rotators after the butterflies |
|---|---|---|---|---|
| 1 | b3 b2 b1 | b4 | b0 | general on paths 1 and 3 |
| 2 | b4 b2 b1 | b3 | b0 | general on paths 1 and 3 |
| 3 | b4 b3 b1 | b2 | b0 | trivial (-j) on path 1, general on path 3 |
| 4 | b4 b3 b2 | b1 | b0 | trivial (always -j) on path 3 |
| 5 | b4 b3 b2 | b0 | b1 | none |

Path bit 0 is always the butterfly bit b(5-s). So paths 0/1 and paths 2/3 are the input pairs of
the stage's two butterflies. The upper butterfly output is a+b. The lower one is a-b, and the
rotator after it multiplies that by W32^phi, where

    phi_s(I) = b(5-s) * (I mod 2^(5-s)) * 2^(s-1),   W32 = exp(-j*2*pi/32).

Only paths 1 and 3 can carry a non-zero rotation. Here is what each rotator sees over one frame,
in units of W32. The angles fold into sets that are equal up to trivial symmetries (multiples of
90 degrees and a swap of re/im):

* stage 1, path 1: 0, 2, 4, ..., 14, which is three angle sets.
* stage 1, path 3: 1, 3, ..., 15, which is two sets.
* stage 2: {0, 4, 8, 12}, two sets, and {2, 6, 10, 14}, one set.
* stage 3: {0, 8} on path 1, which needs only a -j rotator, and {4, 12}, one set, on path 3.
* stage 4: path 3 always carries phi = 8, a constant -j.

`fft_pkg` holds this table as functions: `index_of`, `rotation_of` and `rot_kind`. The top
derives each path's rotator kind from them at elaboration. The table is therefore the single
source of truth. Change it and the rotator placement and coefficient memories follow. Any other
layout is still a correct FFT, as long as path bit 0 stays the butterfly bit and consecutive
stages differ only in the way the shuffles below can produce.

## Shuffling between stages

Between stages 1-2, 2-3 and 3-4 a `shuffle_unit` swaps path bit 0 with the serial bit of weight
L = 4, 2 and 1 respectively. For example, after stage 1, b4 moves into the beat number and b3
moves onto the paths. The circuit works like this:

1. The lower path goes through an L-sample buffer.
2. Two multiplexers then either pass both paths straight or cross them. They cross during the
   second half of each 2L-beat block, that is, when the weight-L bit of the input beat number is 1.
3. The upper multiplexer output goes through a second L-sample buffer.

Take a block of 2L beats in which the upper input carries U0 then U1 and the lower input carries
L0 then L1. The upper output is then U0 then L0, and the lower output is U1 then L1. The shuffle
adds L beats of latency.

Stages 4 and 5 use the same serial bits. Only the two parallel bits change places, so between
them paths 1 and 2 simply cross.

## Rotators

`general_rotator` computes y = round(x * (c + j*w)):

    y_re = (x_re*c - x_im*w + 2^18) >>> 19
    y_im = (x_re*w + x_im*c + 2^18) >>> 19

The coefficients are 21-bit words with 19 fraction bits, so 1.0 = 2^19 is representable. The
rotation by W^0 and by -j is therefore exact. A rotation preserves magnitude, so the output keeps
the input width.

`rotation_memory` is the read-only coefficient table of one rotator, indexed by the beat number in
that stage's layout. Each entry holds c = round(2^19 cos(2*pi*phi/32)) and
w = round(-2^19 sin(2*pi*phi/32)), together with their triples 3c and 3w. The tables are computed
at elaboration. `trivial_rotator` handles -j by swapping re and im and negating the new imaginary
part.

## Radix-8 modified Booth multiplier

`booth_multiplier` computes a signed A x Y product exactly:

* **Recoding.** The data sample A is cut into ceil(WA/3) overlapping quartets
  {a(3i+2), a(3i+1), a(3i), a(3i-1)}, with a 0 below bit 0. `booth_encoder` maps each quartet to
  a digit d = -4*a(3i+2) + 2*a(3i+1) + a(3i) + a(3i-1) in -4..+4. The digit is held as a sign
  plus a one-hot magnitude. For example, 0111 maps to +4, 1000 to -4, and 1111 to 0.
* **Selection.** `booth_selector` picks 0, Y, 2Y, 3Y or 4Y. For a negative digit it inverts the
  value and raises a correction bit, which stands for the "+1" of the two's complement.
  `booth_recoder` (MBR) holds all encoders and selectors.
* **3Y.** Radix-8 needs the hard multiple 3Y. In the FFT the multiplicand Y is a coefficient known
  in advance, so 3Y is stored in the rotation memory (formed as 2Y + Y when the table is built).
  It does not have to be added on every multiplication. This is why the data sample is the
  recoded operand and the coefficient is the multiplicand.
* **Summation.** The partial products are sign-extended and weighted by 8^i. Together with one
  row of correction bits they go through `wallace_tree` (3:2 carry-save levels) down to two rows.
  `cla_adder` then adds those two rows. It uses 4-bit look-ahead blocks whose group
  generate/propagate signals carry between blocks.

At the FFT's widths (10 to 12-bit data, 21-bit coefficients) each product has 4 partial
products. A radix-4 recoding would give 5 or 6. The whole FFT holds five general rotators, so 20
real multipliers.

## Interface and timing (`fft32_mdc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | this cycle is a beat: four input samples are present and the whole pipeline advances |
| `in_re[4]`, `in_im[4]` | in | DW_IN | in beat t, path p carries x[n] with n = 16*p[0] + p[1] + 2t, i.e. x[2t], x[2t+16], x[2t+1], x[2t+17] |
| `out_valid` | out | 1 | one-cycle pulse after each beat whose output is meaningful |
| `out_first` | out | 1 | the pulse that carries output beat 0 of an FFT |
| `out_re[4]`, `out_im[4]` | out | DW_IN+6 | X[out_bin[p]] |
| `out_bin[4]` | out | 5 | frequency index on each path: in output beat t, path p carries X[bitrev5(4t + p)] |

* Parameters: `DW_IN` = 8 (input width) and `CW` = 21 (coefficient width).
* The first beat after reset is beat 0 of the first FFT. After that, every 8 beats form one FFT.
  Idle cycles (`in_valid` low) may fall anywhere. The pipeline just holds during them.
* The latency is 12 beats. Each stage has one register after its butterflies and rotators
  (5 beats in total), and the shuffles add 4 + 2 + 1 beats. An FFT whose first input beat is
  beat b comes out starting with the pulse that follows input beat b + 11.
* To flush the last FFT, feed 12 more beats of any data.
* The output is the unscaled DFT sum X(k) = sum x(n) W32^(nk), except for rounding in the
  rotators.
* A guard bit is added at the input, and each butterfly adds a bit. With this growth no input
  can overflow, including full-scale -128.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_booth_encoder` covers all 16 quartets exhaustively.
* The selector, recoder, multiplier, Wallace tree and adder testbenches compare against plain
  integer arithmetic, using random and extreme operands.
* `tb_rotation_memory` recomputes every coefficient from the layout. It also confirms the
  3/2/2/1/1 angle-set counts listed above.
* The buffer, shuffle and controller testbenches run with random idle cycles.

`tb_fft32_mdc_top` runs the design at its default parameters. It streams 12 FFTs back to back
with random idle cycles: an impulse, full-scale constant and alternating inputs, a fixed 8-sample pattern, and random
data.
It then checks:

* every output bit for bit against a natural-order fixed-point radix-2 DIF FFT computed inside
  the testbench with the same quantisation and rounding;
* every output against a floating-point DFT, to within rounding;
* the output bin numbering;
* the 12-beat latency;
* that general and trivial rotations, shuffle crossings, pipeline holds and back-to-back frames
  all occurred.

To simulate with Verilator (from the directory that holds `rtl/` and `tb/`):

    verilator --binary --timing --assert -Wno-fatal -y rtl rtl/fft_pkg.sv rtl/booth_pkg.sv \
        tb/tb_fft32_mdc_top.sv --top-module tb_fft32_mdc_top -Mdir obj
    ./obj/Vtb_fft32_mdc_top

Use the same command with another `tb_<module>.sv` to run any unit testbench.

## Design choices and limits

* The structure is fixed at N = 32 and P = 4. The five stages, the shuffle lengths and the
  stage-4 crossing follow the layout table. `fft_pkg` is written for this size.
* Choices made here, not taken from a specification:
  - the data and coefficient widths beyond the 8-bit input and 21-bit coefficient;
  - the 19 coefficient fraction bits;
  - round-half-up in the rotators and unscaled bit growth;
  - one register per stage;
  - the `in_valid` beat handshake and the asynchronous reset;
  - sign + one-hot Booth digit coding;
  - the 4-bit CLA block size.
* The rotators are purely combinational within their stage: four Booth multipliers, an adder and
  the rounding, all in one clock cycle. For higher clock rates, add pipeline registers inside
  `general_rotator`. Each register added there must also be added to every path of that stage
  and counted in `stage_offset` in `fft_pkg`, from which the memories' addressing and `LATENCY`
  are derived.
* Only forward transforms are provided. An inverse FFT would need conjugated coefficient tables
  and a 1/N scaling.
* Lint notes: in `cla_adder` the last block-carry bit is unused when the width is not a multiple
  of 4 (the carry-out is then taken inside the last block). `mdc_control` uses `rst_n` both as
  the asynchronous register reset and as the `disable iff` of its assertion.
