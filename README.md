# Dual-mode floating-point divider: one binary64 or two binary32 quotients

This is a floating-point divider whose whole datapath can be used in two
ways. It divides either one pair of IEEE-754 double-precision (DP) numbers,
or two independent pairs of single-precision (SP) numbers packed side by
side into the same 64-bit words. A mode flag chooses which. Every unit in the
datapath handles both cases: the leading-one detector, the shifters, the
multiplier, the rounder. So the SP capability costs a little steering logic
rather than a second divider. The significand quotient is computed by a
multiplicative series-expansion method (Goldschmidt's form), which reuses one
dual-mode radix-4 Booth multiplier over several cycles.

The architecture follows a published dual-mode DP/SP division design. That
design fixes these parts: the three pipeline stages, the dual-mode LOD built
from 2:1 cells, the dual-mode shifters, the series-expansion method on an
iterated dual-mode Booth multiplier, and the single- and two-stage
multiplier versions. The source does not give the seed table, the iteration
schedule, the word formats, the exact-rounding scheme, the handshake or the
timing. Those were designed here, and each is marked as such below and in
the files.

## Interface and operand packing

`dm_fp_div` (top level), parameter `MUL_STAGES` (1 by default, or 2):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | an operation is taken on a rising edge with both high |
| `dp_sp` | in | 1 | 1: one DP division; 0: two SP divisions |
| `in1`, `in2` | in | 64 | dividend(s), divisor(s) |
| `out_valid` | out | 1 | one-cycle strobe, result on `out_result` |
| `out_dp_sp` | out | 1 | mode of that result |
| `out_result` | out | 64 | quotient(s) |

In SP mode, lane 1 is bits [63:32] and lane 0 is bits [31:0] of every
64-bit word. The two lanes never influence each other. One lane may divide
by zero or see a NaN while the other computes an ordinary quotient. The
output has no back-pressure: a result appears once, as a one-cycle
strobe.

## Pipeline and timing

```
 in1,in2,dp_sp ──► stage 1: dm_prenorm ──► reg ──► stage 2: dm_mant_div ──► stage 3: dm_postnorm ──► reg ──► out
                   unpack, 2x dm_lod,              Goldschmidt iterations      normalise, dm_rshift,
                   2x dm_lshift, exponent,         on one dm_booth_mul,        round to nearest even,
                   special classes                 remainder correction        pack, specials
```

Stage 2 takes several cycles. Stage 1 can hold the next operation while
stage 2 is busy (`in_ready` is low only then). Stage 3 and the output
register deliver the previous result while stage 2 starts the next one.
Measured as the number of rising edges from the edge that accepts an
operation to the edge at which `out_valid` is seen high:

| | DP | two SP |
|---|---|---|
| multiplications in stage 2 | 8 | 6 |
| latency, `MUL_STAGES = 1` | 12 | 10 |
| result interval at full load, `MUL_STAGES = 1` | 10 | 8 |
| latency, `MUL_STAGES = 2` | 20 | 16 |
| result interval at full load, `MUL_STAGES = 2` | 18 | 14 |

In general the latency is 4 + n·MUL_STAGES and the interval is
2 + n·MUL_STAGES, where n is the number of multiplications. One SP
operation produces two quotients. SP throughput in quotients per cycle is
therefore about 2.5 times the DP throughput.

## Stage 1: leading-one detection and subnormal operands

Each operand's significand, hidden bit included, is left-aligned in its
field: DP in [63:11], SP lanes in [63:40] and [31:8]. The hidden bit is 0
for a subnormal number. A dual-mode leading-one detector counts the leading
zeros and a dual-mode left shifter removes them. After that, a subnormal
significand looks like a normal one in [1, 2), and the same count is taken
off the operand's exponent. For normal numbers the count is zero, so every
operand takes the same path.

`dm_lod` (64:6) is two 32:5 detectors (`lod_tree`). Each is a binary tree:

* a 2:1 leaf looks at bits (d1, d0) and gives valid = d1 | d0 and a
  leading-zero count of ~d1 & d0;
* a node joins two children. It is valid when either child is. Its count is
  {~valid_hi, valid_hi ? count_hi : count_lo}.

In SP mode the two 32:5 trees give the two lane counts. In DP mode the
64-bit count is the upper count if the upper half has a one, else 32 plus
the lower count. This final join is the only logic that DP needs beyond SP.

`dm_lshift` is a six-stage logarithmic shifter (1, 2, 4, 8, 16 and
32 bits). In DP mode the bits leaving the lower half enter the upper half
and both halves follow one amount. In SP mode that path is cut and each half
has its own amount. The 32-bit stage is active only in DP mode.

Stage 1 also forms, per lane, the sign, the biased exponent
ea − eb + bias of the significand quotient, and the result class after
IEEE 754: NaN for a NaN operand, 0/0 or ∞/∞; ∞ for ∞/x or x/0; zero for
0/x or x/∞. The exponent is a 13-bit signed number, which covers every
combination of subnormal and large operands.

## Stage 2: series-expansion division on a shared Booth multiplier

This is the part that needs the closest reading.

**Method.** For significands a, b in [1, 2), take a seed x0 ≈ 1/b and
iterate

```
D0 = b·x0,  N0 = a·x0,   F_i = 2 − D_i,   N_{i+1} = N_i·F_i,   D_{i+1} = D_i·F_i
```

With e = 1 − b·x0 this gives N = a·x0·(1+e)(1+e²)(1+e⁴)…, the series
expansion of a/b. The error squares at each step.

**Seed.** `recip_rom` has 256 entries of 10 bits, indexed by the 8
fraction bits after the leading one of b. Entry i is round(2^19 / (2i+513)),
the reciprocal of the centre of the interval, in units of 2^-10. The table is
computed from this formula when the design is elaborated; it is not read from
a file. Then |e| < 1.5·2^-9, about 2^-8.4. Two iterations give about
2^-34, which is enough for SP (25 bits are needed). Three give better than
2^-61, which is enough for DP (54 bits are needed). The ROM has two read
ports, one per SP lane; port 1 also serves DP.

**Word formats.** The multiplier is 64×64. DP values are Q2.61 in bits
[62:0]: two integer bits, so values up to 4 fit, which covers a seed that
overshoots. Each SP lane is Q2.29 in the low 31 bits of its half. Products
are truncated back to the same format (DP: product bits [123:61]; SP:
[59:29] and [123:93]).

**Booth multiplier and lane separation.** `dm_booth_mul` recodes b into 33
radix-4 digits in {−2…+2}. Each digit selects 0, ±a or ±2a, shifted by 2j,
and the rows are summed. In SP mode, rows 0–15 (lane 0 of b) see only lane
0 of a, and rows 16–32 see only lane 1 of a. So no cross products arise,
and the 128-bit result holds a1·b1 in [127:64] and a0·b0 in [63:0]. This
works only if bit 31 of b is 0: digit 16 reads b[31] as its "previous" bit,
so a set bit 31 would leak from lane 0 into lane 1. The 31-bit lane formats
above guarantee this. With `MUL_STAGES = 2` the two halves of the row array
are summed and registered, and the final addition comes one cycle later.

**Schedule.** One multiplication per `MUL_STAGES` cycles. Each F uses D
before D is updated:

```
DP: D0 N0 N1 D1 N2 D2 N3 REM      SP: D0 N0 N1 D1 N2 REM
```

**Exact quotient (REM).** Correct rounding needs more than an approximate
quotient. The truncated candidate Qc = floor(N·2^(P+1)) (P = 53 or 24) is
multiplied by the integer significand B on the same multiplier. Then
R = A·2^(P+1) − Qc·B is formed modulo 2^(P+3). Because |R| < 2B, those low
bits determine R exactly. If R < 0, Qc is lowered by one and B is added to
R. If R ≥ B, Qc is raised by one and B is subtracted. The result is the
exact Q = floor(q·2^(P+1)) and a sticky bit (R ≠ 0). This holds as long as
the approximation is within one unit of 2^-(P+1). The error budget above
leaves a margin of several bits for that, and simulation confirms it.

## Stage 3: rounding and subnormal results

`dm_postnorm`, per lane:

1. If q ≥ 1 the significand is Q[P+1:2] and the round bit is Q[1].
   Otherwise the significand is Q[P:1], the round bit is Q[0], and the
   exponent is lowered by one.
2. If the exponent is ≤ 0, the result is subnormal. The shared dual-mode
   right shifter `dm_rshift` moves the significand and round bit right by
   1 − exp, capped at 63 for DP and 31 for SP. Bits that fall out join the
   sticky bit, and the exponent field becomes 0.
3. Round to nearest, ties to even: {exponent field, fraction} + 1 if
   round & (sticky | lsb). The carry handles every boundary by itself: from
   subnormal to the smallest normal, from one binade to the next, and from
   the largest finite number to infinity.
4. An exponent of 2^EW − 1 or more gives ±∞. The special classes from
   stage 1 override the number. NaN results are the canonical quiet NaN
   (`7FF8…0` / `7FC00000`).

## Departures and limits

* Only round to nearest, ties to even, is built. No exception flags are
  produced, and NaN payloads are not propagated.
* The source does not describe these choices made here: the valid/ready
  input handshake, the output strobe without back-pressure, the
  asynchronous reset, and the polarity of `dp_sp`.
* The source reports synthesis results in a 90 nm standard-cell library:
  area, the overhead against a DP-only divider, and clock period. They are
  not reproduced here. The RTL is technology-independent, and its cycle
  counts are this design's own.

## Files

`rtl/` (one module or package per file):

| file | contents |
|---|---|
| `dm_fp_pkg.sv` | formats, constants, `lane_info_t`, result classes |
| `dm_fp_div.sv` | top level, pipeline registers, handshake |
| `dm_prenorm.sv` | stage 1 |
| `lod_tree.sv`, `dm_lod.sv` | 32:5 tree LOD, dual-mode 64:6 LOD |
| `dm_lshift.sv`, `dm_rshift.sv` | dual-mode shifters |
| `dm_mant_div.sv` | stage 2 controller and datapath |
| `dm_booth_mul.sv` | dual-mode radix-4 Booth multiplier |
| `recip_rom.sv` | seed table |
| `dm_postnorm.sv` | stage 3 |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_fp_ref_pkg.sv`, the reference arithmetic. Each testbench prints
`TB_RESULT checks=N failures=M`. The references are independent of the
RTL:

* DP quotients come from the simulator's own binary64 division.
* SP quotients are that binary64 quotient rounded once more to binary32. A
  division rounded first to 53 bits and then to 24 gives the correctly
  rounded binary32 quotient, because 53 ≥ 2·24 + 2.
* Significand quotients are checked against wide-integer division, and
  rounding against a bit-serial round-and-pack function.

`tb_dm_fp_div` runs the top level at its default parameters. It runs:

* directed corner cases, with the latency of each operation checked;
* saturated DP and SP streams, with the result interval checked;
* 100,000 random operations with gaps and mode switches.

It counts each mechanism and fails if one never occurs. The mechanisms are:
DP and SP operations, mode switches, subnormal operands, subnormal results,
rounding up, overflow, special operands, quotient corrections, and input
stalls. `tb_dm_fp_div_ms2` does the same with `MUL_STAGES = 2`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dm_fp_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_dm_fp_div.sv --top-module tb_dm_fp_div
./obj_dir/Vtb_dm_fp_div
```

Replace `tb_dm_fp_div` with any other testbench name. The full top-level run
takes a few seconds.
