// mul_stage1: first stage of the two-stage multiplier. Booth recoding,
// partial product generation and carry-save reduction, ending in the
// rmulsum / rmulcary pipeline registers.
//
// Four mul_slice instances are fed either as four independent 16x16
// multipliers (PACKED_MULL) or as one 64x16 multiplier whose nine 80-bit
// partial products are summed by the four slice trees joined into one 80-bit
// tree. In the packed configuration slice k multiplies srca[16k+15:16k] by
// srcb[16k+15:16k], each extended to 32 bits. In the 64x16 configuration all
// slices receive the same 16-bit multiplier. It comes from the five-way
// selector over the 80-bit reciprocal (b_recip) or directly from a 16-bit
// segment of srcb, through each slice's own five-way multiplier selector.
// Slice k then sees bits [16k+31:16k] of the 80-bit extended multiplicand.
//
// Interface: when `en` is high the reduced sum and carry are registered at
// the clock edge, one cycle after the operands are presented. Outputs are
// the registered per-slice vectors and their 80-bit concatenation (slice 0
// gives columns 31:0, slice k>0 gives its upper 16 columns as 16k+31:16k+16).
// The sum of sum80 and carry80 modulo 2^80 is the 64x16 product; per slice,
// sum + carry modulo 2^32 is the 16x16 product.
//
// The organisation follows the unit's slice design. The split of the
// multiplier selection into a "use srcb / use reciprocal" bit plus a segment
// number is this design's choice.
module mul_stage1
  import mdu_pkg::*;
(
  input  logic                   clk,
  input  logic                   en,          // load rmulsum / rmulcary
  input  logic                   mode80,      // 1: one 64x16 multiply, 0: four 16x16
  input  logic                   a_signed,    // multiplicand(s) are signed
  input  logic                   b_signed,    // packed: multipliers are signed
  input  logic                   m_ext,       // 64x16: extension bit of the common multiplier
  input  logic                   m_recip,     // 64x16: multiplier from b_recip, else from srcb
  input  logic [2:0]             m_seg,       // 64x16: 16-bit segment number (0..4 for b_recip)
  input  logic [XLEN-1:0]        srca,        // multiplicand
  input  logic [XLEN-1:0]        srcb,        // multiplier operand
  input  logic [RECIP_W-1:0]     b_recip,     // reciprocal from the CAM
  output logic [NSLICE-1:0][31:0] rmulsum,
  output logic [NSLICE-1:0][31:0] rmulcary,
  output logic [WIDE_W-1:0]      sum80,
  output logic [WIDE_W-1:0]      carry80
);

  logic [WIDE_W-1:0] a80;
  logic [15:0]       common;
  logic [15:0]       mpl  [NSLICE];
  logic              mplx [NSLICE];
  logic [31:0]       win  [NSLICE];
  logic              wlsb [NSLICE];
  logic [6:0]        x    [NSLICE+1];
  logic [31:0]       s    [NSLICE];
  logic [31:0]       c    [NSLICE];

  assign a80 = {{(WIDE_W-XLEN){a_signed & srca[XLEN-1]}}, srca};

  // Five-way selector of the common multiplier over the reciprocal.
  always_comb begin
    unique case (m_seg)
      3'd0:    common = b_recip[15:0];
      3'd1:    common = b_recip[31:16];
      3'd2:    common = b_recip[47:32];
      3'd3:    common = b_recip[63:48];
      default: common = b_recip[79:64];
    endcase
  end

  always_comb begin
    for (int k = 0; k < NSLICE; k++) begin
      if (!mode80) begin
        mpl[k]  = srcb[16*k +: 16];
        mplx[k] = b_signed & srcb[16*k+15];
        win[k]  = {{16{a_signed & srca[16*k+15]}}, srca[16*k +: 16]};
        wlsb[k] = 1'b0;
      end else begin
        mpl[k]  = m_recip ? common : srcb[16*m_seg[1:0] +: 16];
        mplx[k] = m_ext;
        win[k]  = a80[16*k +: 32];
        wlsb[k] = (k == 0) ? 1'b0 : a80[16*k-1];
      end
    end
  end

  assign x[0] = '0;

  for (genvar k = 0; k < NSLICE; k++) begin : g_slice
    mul_slice #(.IDX(k)) u_slice (
      .mode80      (mode80),
      .mcand       (win[k]),
      .mcand_lsb_in(wlsb[k]),
      .mplier      (mpl[k]),
      .mplier_ext  (mplx[k]),
      .xin         (x[k]),
      .xout        (x[k+1]),
      .sum         (s[k]),
      .carry       (c[k])
    );
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int k = 0; k < NSLICE; k++) begin
        rmulsum[k]  <= s[k];
        rmulcary[k] <= c[k];
      end
    end
  end

  assign sum80   = {rmulsum[3][31:16], rmulsum[2][31:16], rmulsum[1][31:16], rmulsum[0]};
  assign carry80 = {rmulcary[3][31:16], rmulcary[2][31:16], rmulcary[1][31:16], rmulcary[0]};

endmodule
