// mul_slice: one of the four 16x16-bit radix-4 Booth multiplier slices of the
// first multiplier stage, reconfigurable as a 32-column section of a single
// 80-bit reduction tree.
//
// The 16-bit multiplier is extended by two copies of `mplier_ext` (its sign
// for a signed operand, 0 otherwise) and recoded into nine Booth digits.
// Each digit drives a five-way multiple selector (-2, -1, 0, +1, +2) over a
// 32-bit multiplicand window; negative multiples are formed as the ones'
// complement, and the missing +1 ("hot one") of row i is placed in row i+1 at
// column 2i, where that row has a shifted-in zero. Row 8 is never negative,
// so nine rows hold the whole product. The nine rows are reduced to a sum and
// a carry vector by three carry-save levels: two levels of 3:2 counters
// (9 -> 6 -> 4) and a 4:2 compressor (4 -> 2) built from two counters.
//
// Packed mode (mode80 = 0): the window is the slice's own 16-bit multiplicand
// extended to 32 bits and `mcand_lsb_in` is 0; the slice computes its 32-bit
// product in redundant form, modulo 2^32 (full sign extension inside the
// tree).
//
// 80-bit mode (mode80 = 1): the window is bits [16k+31:16k] of the 80-bit
// extended multiplicand of a 64x16 product, `mcand_lsb_in` is bit 16k-1
// (needed to form the x2 multiple), and column c of this slice is column
// 16k+c of the 80-bit product. In slices 1..3 the lower 16 columns compute
// bits that slice k-1 already owns; they are ignored, and the carries into
// column 16 at each tree level are taken from column 31 of slice k-1 through
// 2:1 multiplexers (`xin`). `xout` carries this slice's column-31 carries to
// the slice above. There are seven crossing signals per boundary: three from
// the first level, two from the second, one inside the 4:2 compressor and the
// carry-vector bit itself.
//
// Purely combinational; the rmulsum/rmulcary registers live in mul_stage1.
// The row layout, the crossing multiplexers and the windows follow the
// unit's slice organisation; the hot-one placement and the seventh (carry
// vector) crossing signal are this design's choices.
module mul_slice
  import mdu_pkg::*;
#(
  parameter int unsigned IDX = 0   // slice position 0..3; slice 0 has no crossing inputs
) (
  input  logic        mode80,       // 1: section of the 80-bit tree, 0: independent 16x16
  input  logic [31:0] mcand,        // multiplicand window
  input  logic        mcand_lsb_in, // multiplicand bit just below the window
  input  logic [15:0] mplier,       // 16-bit multiplier
  input  logic        mplier_ext,   // extension bit of the multiplier (sign or 0)
  input  logic [6:0]  xin,          // column-31 carries of the slice below
  output logic [6:0]  xout,         // column-31 carries of this slice
  output logic [31:0] sum,          // redundant result: sum vector
  output logic [31:0] carry         // redundant result: carry vector (already weighted)
);

  logic [17:-1] mext;
  booth_t       dig [NPP];
  logic [31:0]  row [NPP];
  logic         use_xin;

  assign mext    = {mplier_ext, mplier_ext, mplier, 1'b0};
  assign use_xin = mode80 && (IDX != 0);

  // Booth recoding and partial product selection.
  always_comb begin
    for (int i = 0; i < NPP; i++) begin
      dig[i] = booth_recode(mext[2*i+1 -: 3]);
    end
    for (int i = 0; i < NPP; i++) begin
      for (int c = 0; c < 32; c++) begin
        if (c < 2 * i) begin
          row[i][c] = (i > 0 && c == 2 * i - 2) ? dig[i-1].neg : 1'b0;
        end else begin
          logic m1, m2;
          m1 = mcand[c - 2*i];
          m2 = (c == 2 * i) ? mcand_lsb_in : mcand[c - 2*i - 1];
          row[i][c] = ((dig[i].one & m1) | (dig[i].two & m2)) ^ dig[i].neg;
        end
      end
    end
  end

  // 3:2 counter over 32-bit vectors: returns the sum, and the raw (unshifted)
  // carries.
  function automatic logic [63:0] csa(input logic [31:0] a, b, c);
    logic [31:0] s, k;
    s = a ^ b ^ c;
    k = (a & b) | (a & c) | (b & c);
    return {k, s};
  endfunction

  // Weight the raw carries by two. Column 16 takes the crossing carry of the
  // slice below when the tree is concatenated.
  function automatic logic [31:0] wcarry(input logic [31:0] k, input logic x, input logic sel);
    logic [31:0] r;
    r = {k[30:0], 1'b0};
    if (sel) r[16] = x;
    return r;
  endfunction

  logic [31:0] s1 [3], k1 [3], w1 [3];
  logic [31:0] s2 [2], k2 [2], w2 [2];
  logic [31:0] s3, k3, w3, s4, k4;

  always_comb begin
    // Level 1: 9 -> 6
    for (int g = 0; g < 3; g++) begin
      {k1[g], s1[g]} = csa(row[3*g], row[3*g+1], row[3*g+2]);
      w1[g] = wcarry(k1[g], xin[g], use_xin);
    end
    // Level 2: 6 -> 4
    {k2[0], s2[0]} = csa(s1[0], w1[0], s1[1]);
    {k2[1], s2[1]} = csa(w1[1], s1[2], w1[2]);
    w2[0] = wcarry(k2[0], xin[3], use_xin);
    w2[1] = wcarry(k2[1], xin[4], use_xin);
    // Level 3: 4:2 compressor, 4 -> 2
    {k3, s3} = csa(s2[0], w2[0], s2[1]);
    w3 = wcarry(k3, xin[5], use_xin);
    {k4, s4} = csa(s3, w3, w2[1]);
  end

  assign sum   = s4;
  assign carry = wcarry(k4, xin[6], use_xin);
  assign xout  = {k4[31], k3[31], k2[1][31], k2[0][31], k1[2][31], k1[1][31], k1[0][31]};

endmodule
