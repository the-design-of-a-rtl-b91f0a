// mdu_pkg: types and constants shared by the 64-bit integer multiply/divide
// unit.
//
// The unit executes four instruction classes: MULL (64x64 multiply, low 64
// bits of the product plus an overflow flag), PACKED_MULL (four independent
// 16x16 multiplies, each returning the low or the high half of its 32-bit
// product), DIV and REM (64-bit integer quotient and remainder). The widths
// below follow the unit's organisation: 16-bit multiplier slices, an 80-bit
// reduction tree and adder, 13-bit "small" divisors and 80-bit reciprocals
// held in an 8-entry CAM. The signed/unsigned option on each instruction and
// the divide-by-zero result are this design's choices.
package mdu_pkg;

  localparam int unsigned XLEN      = 64;  // operand width
  localparam int unsigned SEG       = 16;  // slice width of the multiplier
  localparam int unsigned NSLICE    = 4;   // 16x16 slices
  localparam int unsigned NPP       = 9;   // radix-4 Booth partial products per 16-bit multiplier
  localparam int unsigned SLICE_W   = 32;  // columns of one slice's CSA tree
  localparam int unsigned WIDE_W    = 80;  // width of the concatenated tree and of the adder
  localparam int unsigned SMALL_W   = 13;  // divisors of this many bits or fewer are "small"
  localparam int unsigned RECIP_W   = 80;  // stored reciprocal precision
  localparam int unsigned CAM_DEPTH = 8;   // reciprocal CAM entries

  typedef enum logic [1:0] {
    OP_MULL   = 2'd0,
    OP_PMULL  = 2'd1,
    OP_DIV    = 2'd2,
    OP_REM    = 2'd3
  } op_e;

  // Operation of the multiplier's second stage for one cycle.
  typedef enum logic [2:0] {
    S2_HOLD   = 3'd0,  // keep the accumulator
    S2_FIRST  = 3'd1,  // acc = sum + carry (first 64x16 product)
    S2_ACC    = 3'd2,  // acc = (acc >> 16) + sum + carry, 16 bits shifted out to the low register
    S2_SUB    = 3'd3,  // acc = x - (sum + carry)
    S2_ADD    = 3'd4,  // acc = x + y + cin
    S2_PACKED = 3'd5   // four 32-bit sums, one 16-bit half of each to the packed result
  } s2op_e;

  // One radix-4 Booth digit, -2..+2, as select lines of the five-way
  // multiple multiplexer.
  typedef struct packed {
    logic neg;   // negative multiple (ones' complement plus a hot one)
    logic one;   // select 1 x multiplicand
    logic two;   // select 2 x multiplicand
  } booth_t;

  // Characteristics of an operand reported to the control logic.
  typedef struct packed {
    logic       zero;    // operand is 0
    logic       one;     // magnitude is 1 (operand is +1, or -1 when signed)
    logic       shortop;  // magnitude fits in SMALL_W bits
    logic       neg;     // operand is negative (signed operations only)
    logic [6:0] lzc;     // leading zeros of the magnitude (64 when zero)
  } opinfo_t;

  // Radix-4 Booth recoding of the bit triple (b[2i+1], b[2i], b[2i-1]).
  function automatic booth_t booth_recode(input logic [2:0] t);
    booth_t d;
    d.neg = t[2] & ~(t[1] & t[0]);
    d.one = t[1] ^ t[0];
    d.two = (t[2] & ~t[1] & ~t[0]) | (~t[2] & t[1] & t[0]);
    return d;
  endfunction

endpackage
