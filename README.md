# A 64-bit integer multiply/divide unit with a reciprocal cache

This is the RTL of a multiply/divide unit for a 64-bit processor, designed
under a tight transistor budget. Two operations get dedicated speed, and
everything else reuses their hardware:

* **Packed 16-bit multiply (PACKED_MULL).** Four independent 16x16 multiplies
  in one 64-bit word. One instruction per clock, result after 2 clocks.
* **Repeated division by small divisors.** Divisors of 13 bits or fewer are
  common in the target applications, and a loop tends to reuse a handful of
  them. The first time such a divisor is seen, its 80-bit reciprocal is
  computed and stored in an 8-entry CAM (content-addressable memory). Every
  later division by it becomes a multiplication, Q = A * (1/B).

The 64x64 multiply (MULL), general division (DIV) and remainder (REM) run on
the same hardware. MULL is a sequence of 64x16 multiplies on the four 16x16
multipliers joined into one 80-bit tree. General division is radix-4 SRT.
The multiplier's adder stage also does the accumulation, subtraction,
increment and negation steps of the division paths.

## Instructions and clock counts

Latency is counted from the issue clock (`in_valid && ready`) to the clock in
which `out_valid` is high. Here s is the number of leading zeros of |B|.

| instruction | path | latency (clocks) |
|---|---|---|
| PACKED_MULL | 2-stage pipeline, one issue per clock | 2 |
| MULL | one 64x16 pass per significant 16-bit segment of the shorter operand (1..4 passes) | 2..5 |
| DIV/REM, B = 0 | quotient all ones, remainder = A | 2 |
| DIV/REM, \|B\| = 1 | quotient = +-A, remainder 0 | 2 |
| DIV, \|B\| < 2^13, reciprocal stored | five 64x16 passes over the 80-bit reciprocal | 7 |
| REM, same | as DIV, then A - Q*B: one pass and a subtraction | 9 |
| DIV/REM, \|B\| < 2^13, not stored | compute the reciprocal with SRT, increment, store, then as above | N'+12 / N'+14 = 47..54, N' = floor((s+19)/2) |
| DIV/REM, otherwise | radix-4 SRT, N = floor((s+3)/2) iterations | N+4 = 5..37 |

MULL returns the low 64 bits of the product. `overflow` is set when the high
64 bits are not a sign extension (signed) or not zero (unsigned).
PACKED_MULL returns, for each of the four lanes, the low or high 16 bits of
the 32-bit product, as selected by `pk_high`. `is_signed` applies to every
instruction. Signed division truncates toward zero, and the remainder takes
the sign of the dividend.

## Block structure

```
 srca_bus[0..3] -> operand_latch (A) --+--> operand_examine (A): |A|, leading zeros
 srcb_bus[0..3] -> operand_latch (B) --+--> operand_examine (B): |B|, leading zeros,
                                       |      zero / one / small flags, |B| << s
                                       |
        |B|[12:0] --> recip_cam (8 x {13-bit divisor, 80-bit reciprocal}, pseudo-LRU)
                          | reciprocal
                          v
  A, B ---------> mul_stage1: 4 x mul_slice (Booth + CSA tree), rmulsum/rmulcary registers
                          |
                          v
                  mul_stage2: 3:2 CSA + 80-bit adder, accumulator, packed result
                          ^ SRT quotient digits (the accumulator also feeds the CAM write port)
  |A|, |B|, |B|<<s -> srt_div (radix-4 SRT, carry-save remainder) --+
                                                                     |
  mdu_top: sequencer that drives all of the above per instruction ---+
```

| file | block |
|---|---|
| `rtl/mdu_pkg.sv` | shared widths, instruction and stage-2 operation enums, Booth recoding |
| `rtl/operand_latch.sv` | 4:1 source selector and operand hold register |
| `rtl/operand_examine.sv` | magnitude, leading-zero count, zero/one/small flags, normalisation |
| `rtl/mul_slice.sv` | one 16x16 Booth multiplier with its nine-row CSA tree |
| `rtl/mul_stage1.sv` | four slices, multiplier selection, pipeline registers |
| `rtl/mul_stage2.sv` | 80-bit adder/accumulator stage |
| `rtl/srt_div.sv` | radix-4 SRT divider and reciprocal generator |
| `rtl/recip_cam.sv` | reciprocal CAM |
| `rtl/mdu_top.sv` | top level and control sequencer |

## The reconfigurable multiplier (the hard part)

### One slice

Each `mul_slice` is a radix-4 Booth multiplier for a 16-bit multiplier. The
multiplier is extended by two bits (its sign bit when signed, zeros
otherwise), which gives nine Booth digits in {-2, -1, 0, +1, +2}. This is why
the same slice handles signed and unsigned operands. Each digit selects one
of the five multiples of a 32-bit multiplicand window. A negative multiple is
the ones' complement. Its missing +1 is placed in the next row at column 2i,
where that row has a shifted-in zero. The ninth row never takes a negative
multiple, so nine rows always hold the whole product.

The nine 32-bit rows are reduced in three carry-save levels:

* 3:2 counters take the nine rows to six.
* A second level of 3:2 counters takes six to four.
* A 4:2 compressor, built from two 3:2 counters, takes four to two.

The slice outputs a sum vector and a carry vector. In packed mode the window
is the lane's 16-bit multiplicand, sign- or zero-extended to 32 bits. The
lane's 32-bit product is then `sum + carry` mod 2^32.

### Four slices as one 80-bit tree

For a 64x16 multiply, all four slices get the same 16-bit multiplier. The
multiplicand A is extended to 80 bits, and slice k sees bits [16k+31:16k] of
it. Column c of slice k then carries the weight of column 16k+c of the 80-bit
product:

* slice 0 produces product columns 31:0;
* slices 1, 2 and 3 produce only columns 16k+31:16k+16, from their upper
  half.

The lower half of slices 1..3 repeats columns that the slice below already
owns, and its result is thrown away. To make the upper half right, the
carries into column 16 of slice k must come from column 31 of slice k-1, not
from the slice's own column 15. A 2:1 multiplexer sits at column 16 of each
level's carry vector, controlled by `mode80`. Seven signals cross each of
the three slice boundaries:

* three carries from the first level;
* two from the second level;
* one from inside the 4:2 compressor;
* the output carry-vector bit.

The 80-bit sum and carry vectors are then put together from slice 0's 32
columns and the upper 16 columns of slices 1..3. Their sum mod 2^80 is the
exact 64x16 product. It is signed if A is signed, or if the segment is the
top segment of a signed multiplier.

Each slice also gets bit 16k-1 of the multiplicand (`mcand_lsb_in`), which the
x2 multiple needs at the low edge of its window. With this column layout it
is used only for row 8 at column 16. Row 8's digit is never +-2, so the bit
never changes the result. It is kept so that each slice's window matches its
neighbours.

### The second stage

`mul_stage2` has one 3:2 counter in front of an 80-bit carry-propagate adder.
This lets it add the redundant first-stage result to a third value in one
clock:

* `S2_FIRST`: `acc = sum + carry`.
* `S2_ACC`: `acc = (acc >> 16) + sum + carry`. The shift is arithmetic when
  signed. The 16 bits shifted out enter the top of the 64-bit `lo` register.
  After n passes, `{acc, lo}` holds the product, shifted so that the low
  16(n-1) bits sit at the top of `lo`. `mdu_top` realigns them.
* `S2_SUB`: `acc = x - (sum + carry)`, as `x + ~sum + ~carry + 2`. One +1
  goes into the free carry LSB and one into the carry-in.
* `S2_ADD`: `acc = x + y + cin`. During SRT division it accumulates the
  quotient digits (`acc = 4 acc + q`, one digit per clock). Afterwards it
  increments the reciprocal, applies the divider's -1 correction and applies
  the final sign (`0 + ~v + 1`).
* `S2_PACKED`: four independent 32-bit additions. Each contributes its low or
  high half to `pk`.

MULL skips the multiplier segments above the highest one that is not a pure
zero or sign extension of the segment below. Both operands are measured this
way at issue, and the one with fewer significant segments becomes the
multiplier; the other becomes the multiplicand. The last segment processed
is multiplied as signed in a signed MULL. A 64x64 multiply takes 1 to 4
passes.
Stage 2 trails stage 1 by one clock, so the result is ready one clock after
the last pass.

## Division

### Multiplying by a stored reciprocal

For a divisor 2 <= |B| < 2^13 the stored value is

    Br = floor(2^80 / |B|) + 1        (80 bits)

so Br/2^80 = 1/|B| + e with 0 < e <= 2^-80. For any |A| < 2^64:

    |A| * Br / 2^80 = Q + R/|B| + |A|*e,   R/|B| <= 1 - 2^-13,   |A|*e < 2^-16

The fractional part stays below 1, so Q = floor(|A| * Br / 2^80), which is
bits 143:80 of the 64x80 product. Any precision of 78 bits or more would do;
80 is five 16-bit segments. The product takes five 64x16 passes, with the
multiplier segments taken from the CAM output. REM then multiplies Q by |B|
(one pass, since |B| fits in 16 bits) and subtracts the product from |A| in
the second stage.

### Radix-4 SRT

`srt_div` divides unsigned magnitudes. The divisor comes normalised,
D = |B| << s, so d = D/2^64 is in [1/2, 1). The dividend is scaled so that
the first partial remainder is below d/2. Each iteration then produces one
digit q in {-2..2} and computes w' = 4w - q*d. The partial remainder is kept
as a 70-bit sum/carry pair (3 integer, 67 fraction bits) and updated by a
single 3:2 counter.

The digit comes from a 7-bit estimate of 4w (top 7 bits of both vectors
added: 3 integer, 4 fraction bits) and the four divisor bits below the
leading one (index j, Dl = 16 + j). It is compared with thresholds

    m_k(j) = ceil( max((3k-2)*Dl, (3k-2)*(Dl+1)) / 6 )    in units of 1/16, k = 2, 1, 0, -1

and q is the largest k with estimate >= m_k, or -2. These are the smallest
thresholds that keep |w| <= 2d/3 for every divisor in the interval and every
truncation error. A margin of at least 1/16 remains for all 16 intervals.

The number of iterations is N = floor((s+3)/2), so a divisor with many
leading zeros takes more clocks. The remainder after the last iteration is
(S + C) >> (s+3). If it is negative, |B| is added to it and Q must be
decreased by one.

The divider has no quotient register. It emits one digit per iteration, and
the second stage of the multiplier, idle during division, accumulates
Q = 4Q + q in its 80-bit accumulator. The divider resolves the remainder
itself and raises a flag when Q needs the -1. That -1 is merged into the
clock that applies the sign: +(Q - c) = Q + (c ? -1 : 0) and
-(Q - c) = ~Q + c + 1.

Reciprocals use the same datapath with the dividend 2^80, in
N' = floor((s+19)/2) iterations. The second stage then adds one (or nothing,
when the divider asked for -1) and the result is written to the CAM.

### The CAM

`recip_cam` holds 8 entries of {valid, 13-bit divisor, 80-bit reciprocal}. A
lookup compares all tags in one clock, combinationally. Replacement uses a
tree pseudo-LRU: 7 bits, each pointing to the less recently used half of its
subtree. A lookup hit that is used updates the tree, and so does every write.
Invalid entries are filled first, and all entries are cleared at reset.

## Interface of `mdu_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` / `ready` | in / out | 1 | instruction handshake |
| `op` | in | `op_e` | `OP_MULL`, `OP_PMULL`, `OP_DIV`, `OP_REM` |
| `is_signed`, `pk_high` | in | 1 | signed operands; PACKED_MULL high halves |
| `sela`, `selb` | in | 2 | source selects |
| `srca_bus`, `srcb_bus` | in | 4 x 64 | four sources for each operand, read in the issue clock only |
| `out_valid`, `result`, `overflow` | out | 1, 64, 1 | result (overflow only for MULL) |
| `srca_0_cnt`, `srcb_0_cnt`, `cam_hit` | out | 7, 7, 1 | operand leading zeros and CAM hit, for observation |

`ready` is high when the sequencer is idle or presenting a result. A
non-packed instruction is also held back while a packed one occupies the
first stage, so that two results never arrive together (an assertion checks
this). Packed instructions can be issued on every clock.

## Design choices and departures

Where this RTL makes its own choices, or departs from the organisation it
follows:

* **Where division is finished.** The second stage accumulates the SRT
  quotient, corrects it and applies its sign, as in the original
  organisation. The final remainder sum, its shift and its correction stay
  inside the divider, which therefore keeps a 70-bit adder of its own; the
  original also does that sum in the second stage.
* **Clock counts of SRT division.** The divider alone takes 3..35 clocks.
  Issue to result takes 5..37, because of the sign fix-up and the hand-over.
  The leading zeros of the dividend are not used to skip iterations.
* **MULL operand exchange.** Making the shorter operand the multiplier is
  this design's way of using both operands' leading-zero information.
* **Packed result adder.** Packed results use four 32-bit segment adders
  beside the 80-bit adder.
* **Operand latches.** They are flip-flops with a bypass in the issue clock,
  not transparent latches.
* **A-side shift.** A left shift of operand A by 0 or 32 ahead of the
  multiplier is not built. Its purpose is not known.
* **Behaviour left undefined before.** The divide-by-zero result, the
  signed/unsigned option on every instruction, the handshake, the reset
  values and all control sequencing are this design's.
* **Seventh crossing multiplexer.** The carry-vector bit crosses each slice
  boundary through a seventh multiplexer.

Not modelled: circuit-level and process aspects of the original (BiCMOS
implementation, clock period, transistor count), and the variants the
original was compared with.

## Verification

Each block has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_mul_slice` | 16x16 products, signed/unsigned, corners and random |
| `tb_mul_stage1` | packed products per lane; 64x16 products from srcb and reciprocal segments |
| `tb_mul_stage2` | shift-accumulated 128-bit products, SUB, ADD, HOLD, packed halves |
| `tb_srt_div` | random quotients/remainders of all divisor lengths; reciprocals; digit count; exact N+2 cycle counts |
| `tb_recip_cam` | hits and data against a reference model, overwrite, pseudo-LRU victims |
| `tb_operand_latch`, `tb_operand_examine` | bypass/hold; magnitude, flags, leading zeros, normalisation |
| `tb_mdu_top` | end to end at default sizes |
| `tb_div_loop` | a division-heavy loop on the whole unit: results, clocks, CAM reuse |

`tb_mdu_top` issues about 400 random instructions plus corner cases. It
checks every result against ordinary arithmetic and every latency against
the table above. It also counts each mechanism and fails if one never
occurs:

* back-to-back packed issue;
* MULL with and without overflow;
* MULL with skipped segments;
* MULL with A as the multiplier;
* divisors 0 and +-1;
* reciprocal generation, CAM hits and CAM replacement;
* fast REM;
* SRT division;
* signed negation.

`tb_div_loop` models the loop the reciprocal store is meant for. In its
first phase it runs 1000 divisions: 95% by one of four recurring small
divisors and 5% by random large ones. Only the first division by each small
divisor generates a reciprocal; all later ones take the fast path. This
averages about 8 clocks per division, against about 33 clocks if every
division went through the SRT divider. In the second phase 10% of the
divisions use one-time small divisors. These first fill the four free
entries and then start evicting. A recurring reciprocal is then lost now and
then: with one seed, 17 of about 900 recurring divisions had to regenerate
it, and the average rose to about 12 clocks.

To run a testbench with Verilator (example for the top):

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_mdu_top \
        rtl/mdu_pkg.sv tb/tb_mdu_top.sv -y rtl -y tb +libext+.sv
    ./obj_dir/Vtb_mdu_top

Every testbench runs in well under a second. The package `rtl/mdu_pkg.sv`
must be read first. Other modules are found through `-y rtl`.
