// mdu_top: 64-bit integer multiply/divide unit.
//
// The unit is built around one shared multiplier: a first stage of four
// 16x16 Booth slices that can be joined into one 64x16 multiplier with an
// 80-bit carry-save tree (mul_stage1), and a second stage holding an 80-bit
// adder and accumulator (mul_stage2). Around it sit two operand selectors and
// latches (operand_latch), operand examination (operand_examine), a radix-4
// SRT divider (srt_div) and an 8-entry CAM of reciprocals of small divisors
// (recip_cam). The control sequencer in this module steps the shared
// hardware through each instruction:
//
//   PACKED_MULL  four 16x16 products, low or high halves (pk_high). Fully
//                pipelined: one per clock, result 2 clocks after issue.
//   MULL         one 64x16 pass per 16-bit segment of the multiplier,
//                accumulated with 16-bit shifts in the second stage. Segments
//                above the highest significant one (pure zero or sign
//                extension) are skipped, and of A and B the operand with
//                fewer significant segments is made the multiplier, so a
//                multiply takes 1 to 4 passes.
//                Result (low 64 bits) and overflow (high 64 bits not a
//                sign/zero extension) passes+1 = 2..5 clocks after issue.
//   DIV / REM    on magnitudes, sign fixed at the end:
//     divisor 0       quotient all ones, remainder = dividend (2 clocks)
//     divisor +-1     quotient +-dividend, remainder 0 (2 clocks)
//     |divisor| < 2^13 and in the CAM: Q = floor(|A| * Br / 2^80) by five
//                     64x16 passes over the 80-bit reciprocal Br (DIV 7
//                     clocks); REM then forms |A| - Q*|B| with one more pass
//                     and a subtraction in the second stage (9 clocks).
//     |divisor| < 2^13, not in the CAM: the SRT divider computes
//                     floor(2^80/|B|), the second stage adds one, the result
//                     is written to the CAM and the fast path above follows
//                     (N'+12 clocks for DIV, N'+14 for REM, N' = floor((s+19)/2)
//                     the reciprocal's iteration count: 47 to 54 clocks).
//     otherwise       SRT division: the divider's N+2 = 3..35 clocks plus
//                     one clock to apply the sign and one to hand the result
//                     over, N+4 = 5..37 clocks. The quotient digits are
//                     accumulated in the second stage as they are produced,
//                     and the divider's -1 correction is merged into the
//                     clock that applies the sign.
//   Here s is the number of leading zeros of |B|.
//
// Interface: an instruction is accepted when `in_valid` and `ready` are both
// high; `ready` is high when the sequencer is idle or presenting a result,
// and a non-packed instruction also waits while a packed one is in the first
// stage. The sources `srca_bus[sela]` and `srcb_bus[selb]` are read in the
// issue cycle only. `out_valid` is high for one cycle with `result` (and
// `overflow` for MULL). `is_signed` selects signed operands for every
// instruction. Status outputs give the leading-zero counts of both operands
// and the CAM hit, as the control logic sees them.
//
// The instruction set, the shared-hardware organisation and the clock counts
// follow the unit's description. The signed/unsigned option, the
// divide-by-zero result, truncating signed division, and the sequencing
// details (one clock to apply the sign, when the CAM is looked up) are this
// design's choices.
module mdu_top
  import mdu_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   ready,
  input  op_e                    op,
  input  logic                   is_signed,
  input  logic                   pk_high,
  input  logic [1:0]             sela,
  input  logic [1:0]             selb,
  input  logic [3:0][XLEN-1:0]   srca_bus,
  input  logic [3:0][XLEN-1:0]   srcb_bus,
  output logic                   out_valid,
  output logic [XLEN-1:0]        result,
  output logic                   overflow,
  output logic [6:0]             srca_0_cnt,
  output logic [6:0]             srcb_0_cnt,
  output logic                   cam_hit
);

  typedef enum logic [3:0] {
    IDLE, MUL, MUL_LAST, FAST, FAST_LAST, QB, RSUB, RGEN, INC, CAMWR, DWAIT, FIX, RESP
  } state_e;

  typedef enum logic [2:0] {
    FX_FASTQ, FX_ACC, FX_SRTQ, FX_SRTR, FX_ONES, FX_A, FX_AMAG, FX_ZERO
  } fix_e;

  state_e            state;
  fix_e              fix_src;
  logic [WIDE_W-1:0] acc;      // second-stage accumulator
  op_e    op_q;
  logic   sgn_q, a_neg_q, b_neg_q, mull_q;
  logic [1:0] mul_last_q;  // MULL: index of the last 16-bit multiplier segment
  logic       mul_swap_q;  // MULL: A is the multiplier, B the multiplicand
  logic [2:0] pass;
  logic   p1, p1_high, p2;

  // ---------------------------------------------------------------- operands
  logic accept, issue_any;
  logic [XLEN-1:0] opa, opb;

  assign ready     = (state == IDLE || state == RESP) && (!p1 || op == OP_PMULL);
  assign accept    = in_valid && ready;
  assign issue_any = accept;

  operand_latch u_lat_a (.clk, .rst_n, .src(srca_bus), .sel(sela), .load(issue_any), .q(opa));
  operand_latch u_lat_b (.clk, .rst_n, .src(srcb_bus), .sel(selb), .load(issue_any), .q(opb));

  logic            sgn_now;
  opinfo_t         a_info, b_info;
  logic [XLEN-1:0] a_mag, b_mag, a_norm, b_norm;
  logic [5:0]      a_shift, b_shift;

  assign sgn_now = accept ? is_signed : sgn_q;

  operand_examine u_exa (.val(opa), .is_signed(sgn_now), .info(a_info), .mag(a_mag), .norm(a_norm), .shift(a_shift));
  operand_examine u_exb (.val(opb), .is_signed(sgn_now), .info(b_info), .mag(b_mag), .norm(b_norm), .shift(b_shift));

  assign srca_0_cnt = a_info.lzc;
  assign srcb_0_cnt = b_info.lzc;

  // --------------------------------------------------------------------- CAM
  logic              cam_touch, cam_wr;
  logic [RECIP_W-1:0] cam_data;

  recip_cam u_cam (
    .clk, .rst_n,
    .lk_tag (b_mag[SMALL_W-1:0]),
    .touch  (cam_touch),
    .hit    (cam_hit),
    .lk_data(cam_data),
    .wr_en  (cam_wr),
    .wr_tag (b_mag[SMALL_W-1:0]),
    .wr_data(acc)
  );

  // ----------------------------------------------------------------- divider
  logic              div_start, div_recip, div_busy, div_done;
  logic              div_qv, div_qfirst, div_qneg;
  logic signed [2:0] div_qd;
  logic [XLEN-1:0]   div_rem;

  srt_div u_div (
    .clk, .rst_n,
    .start (div_start),
    .recip (div_recip),
    .a     (a_mag),
    .b     (b_mag),
    .d_norm(b_norm),
    .s     (b_shift),
    .busy  (div_busy),
    .done  (div_done),
    .q_valid(div_qv),
    .q_first(div_qfirst),
    .q_digit(div_qd),
    .q_neg (div_qneg),
    .rem   (div_rem)
  );

  // -------------------------------------------------------------- multiplier
  logic               s1_en, s1_mode80, s1_asg, s1_bsg, s1_mext, s1_mrecip;
  logic [2:0]         s1_seg;
  logic [XLEN-1:0]    s1_a, s1_b;
  logic [NSLICE-1:0][31:0] rmulsum, rmulcary;
  logic [WIDE_W-1:0]  sum80, carry80;

  mul_stage1 u_s1 (
    .clk,
    .en      (s1_en),
    .mode80  (s1_mode80),
    .a_signed(s1_asg),
    .b_signed(s1_bsg),
    .m_ext   (s1_mext),
    .m_recip (s1_mrecip),
    .m_seg   (s1_seg),
    .srca    (s1_a),
    .srcb    (s1_b),
    .b_recip (cam_data),
    .rmulsum (rmulsum),
    .rmulcary(rmulcary),
    .sum80   (sum80),
    .carry80 (carry80)
  );

  s2op_e             s2_op;
  logic              s2_sg, s2_cin;
  logic [WIDE_W-1:0] s2_x, s2_y;
  logic [XLEN-1:0]   lo, pk;

  mul_stage2 u_s2 (
    .clk, .rst_n,
    .op        (s2_op),
    .acc_signed(s2_sg),
    .pk_high   (p1_high),
    .sum80     (sum80),
    .carry80   (carry80),
    .psum      (rmulsum),
    .pcarry    (rmulcary),
    .x         (s2_x),
    .y         (s2_y),
    .cin       (s2_cin),
    .acc       (acc),
    .lo        (lo),
    .pk        (pk)
  );

  // ------------------------------------------------------- issue decisions
  logic iss_mull, iss_pmull, iss_div, iss_special, iss_fast, iss_rgen, iss_srt;
  logic [1:0] mul_last_now, last_a, last_b;
  logic       mul_swap_now;
  logic [XLEN-1:0] mcand_now, mplier_now, mcand_q, mplier_q;

  // MULL passes: segments of the multiplier above the last one must be a
  // pure zero (unsigned) or sign (signed) extension; the last segment is then
  // treated as signed for a signed multiply. The operand with fewer
  // significant segments becomes the multiplier.
  function automatic logic [1:0] last_seg(input logic [XLEN-1:0] v, input logic sg);
    logic [1:0] r;
    r = 2'd3;
    for (int j = 2; j >= 0; j--) begin
      logic            fits;
      logic [XLEN-1:0] above;
      if (sg) begin
        above = XLEN'($signed(v) >>> (16 * j + 15));
        fits  = (above == '0) || (above == '1);
      end else begin
        above = v >> (16 * (j + 1));
        fits  = (above == '0);
      end
      if (fits) r = 2'(j);
    end
    return r;
  endfunction

  always_comb begin
    last_a       = last_seg(opa, is_signed);
    last_b       = last_seg(opb, is_signed);
    mul_swap_now = (last_a < last_b);
    mul_last_now = mul_swap_now ? last_a : last_b;
    mcand_now    = mul_swap_now ? opb : opa;
    mplier_now   = mul_swap_now ? opa : opb;
    mcand_q      = mul_swap_q ? opb : opa;
    mplier_q     = mul_swap_q ? opa : opb;
  end

  always_comb begin
    iss_mull    = accept && op == OP_MULL;
    iss_pmull   = accept && op == OP_PMULL;
    iss_div     = accept && (op == OP_DIV || op == OP_REM);
    iss_special = iss_div && (b_info.zero || b_info.one);
    iss_fast    = iss_div && !iss_special && b_info.shortop && cam_hit;
    iss_rgen    = iss_div && !iss_special && b_info.shortop && !cam_hit;
    iss_srt     = iss_div && !iss_special && !b_info.shortop;
  end

  // ------------------------------------------------------ datapath control
  logic              fix_neg;
  logic [WIDE_W-1:0] fix_v;

  always_comb begin
    // first stage
    s1_en = 1'b0; s1_mode80 = 1'b1; s1_asg = 1'b0; s1_bsg = 1'b0; s1_mext = 1'b0;
    s1_mrecip = 1'b0; s1_seg = '0; s1_a = opa; s1_b = opb;
    // second stage
    s2_op = S2_HOLD; s2_sg = 1'b0; s2_x = '0; s2_y = '0; s2_cin = 1'b0;
    // others
    cam_touch = 1'b0; cam_wr = 1'b0; div_start = 1'b0; div_recip = 1'b0;
    unique case (fix_src)
      FX_FASTQ: fix_v = WIDE_W'(acc[WIDE_W-1:16]);
      FX_ACC:   fix_v = acc;
      FX_SRTQ:  fix_v = acc;
      FX_SRTR:  fix_v = WIDE_W'(div_rem);
      FX_ONES:  fix_v = WIDE_W'({XLEN{1'b1}});
      FX_A:     fix_v = WIDE_W'(opa);
      FX_AMAG:  fix_v = WIDE_W'(a_mag);
      default:  fix_v = '0;
    endcase

    if (iss_pmull) begin
      s1_en = 1'b1; s1_mode80 = 1'b0; s1_asg = is_signed; s1_bsg = is_signed;
    end else if (iss_mull) begin
      s1_en = 1'b1; s1_asg = is_signed; s1_seg = 3'd0;
      s1_a = mcand_now; s1_b = mplier_now;
      s1_mext = is_signed && mul_last_now == 2'd0 && mplier_now[15];
    end else if (iss_fast) begin
      s1_en = 1'b1; s1_a = a_mag; s1_mrecip = 1'b1; s1_seg = 3'd0; cam_touch = 1'b1;
    end else if (iss_rgen || iss_srt) begin
      div_start = 1'b1; div_recip = iss_rgen;
    end

    unique case (state)
      MUL: begin
        s1_en = 1'b1; s1_asg = sgn_q; s1_seg = pass;
        s1_a = mcand_q; s1_b = mplier_q;
        s1_mext = sgn_q && pass == 3'(mul_last_q) && mplier_q[16*pass[1:0]+15];
        s2_op = (pass == 3'd1) ? S2_FIRST : S2_ACC; s2_sg = sgn_q;
      end
      MUL_LAST: begin
        s2_op = (mul_last_q == 2'd0) ? S2_FIRST : S2_ACC; s2_sg = sgn_q;
      end
      FAST: begin
        s1_en = 1'b1; s1_a = a_mag; s1_mrecip = 1'b1; s1_seg = pass;
        if (pass != 3'd0) s2_op = (pass == 3'd1) ? S2_FIRST : S2_ACC;
      end
      FAST_LAST: s2_op = S2_ACC;
      QB: begin
        s1_en = 1'b1; s1_a = acc[WIDE_W-1:16]; s1_b = b_mag; s1_seg = 3'd0;
      end
      RSUB: begin
        s2_op = S2_SUB; s2_x = WIDE_W'(a_mag);
      end
      // SRT digits accumulate in the second stage: acc <= 4 acc + q.
      RGEN, DWAIT: if (div_qv) begin
        s2_op = S2_ADD;
        s2_x  = div_qfirst ? '0 : {acc[WIDE_W-3:0], 2'b00};
        s2_y  = WIDE_W'(div_qd);
      end
      // Br = Q + 1, or Q when the divider asks for Q - 1.
      INC: begin
        s2_op = S2_ADD; s2_x = acc; s2_cin = !div_qneg;
      end
      CAMWR: cam_wr = 1'b1;
      // Sign and, for an SRT quotient, the divider's -1 correction:
      // +(Q - c) = Q + (c ? -1 : 0), -(Q - c) = ~Q + c + 1.
      FIX: begin
        s2_op = S2_ADD; s2_y = fix_neg ? ~fix_v : fix_v; s2_cin = fix_neg;
        if (fix_src == FX_SRTQ) begin
          s2_x = fix_neg ? WIDE_W'(div_qneg) : {WIDE_W{div_qneg}};
        end
      end
      default: ;
    endcase

    if (p1) s2_op = S2_PACKED;
  end

  // Sign of the final value: quotients take the sign of A xor B, remainders
  // the sign of A.
  always_comb begin
    unique case (fix_src)
      FX_FASTQ, FX_SRTQ, FX_AMAG: fix_neg = sgn_q & (a_neg_q ^ b_neg_q);
      FX_ACC, FX_SRTR:            fix_neg = sgn_q & a_neg_q;
      default:                    fix_neg = 1'b0;
    endcase
  end

  // --------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      fix_src <= FX_ZERO;
      op_q    <= OP_MULL;
      sgn_q   <= 1'b0;
      a_neg_q <= 1'b0;
      b_neg_q <= 1'b0;
      mull_q  <= 1'b0;
      mul_last_q <= 2'd3;
      mul_swap_q <= 1'b0;
      pass    <= '0;
      p1      <= 1'b0;
      p1_high <= 1'b0;
      p2      <= 1'b0;
    end else begin
      p1      <= iss_pmull;
      p1_high <= pk_high;
      p2      <= p1;

      if (accept && op != OP_PMULL) begin
        op_q    <= op;
        sgn_q   <= is_signed;
        a_neg_q <= a_info.neg;
        b_neg_q <= b_info.neg;
        mull_q  <= (op == OP_MULL);
        mul_last_q <= mul_last_now;
        mul_swap_q <= mul_swap_now;
      end

      unique case (state)
        IDLE, RESP: begin
          state <= IDLE;
          if (iss_mull) begin
            state <= (mul_last_now == 2'd0) ? MUL_LAST : MUL; pass <= 3'd1;
          end else if (iss_fast) begin
            state <= FAST; pass <= 3'd1;
          end else if (iss_rgen) begin
            state <= RGEN;
          end else if (iss_srt) begin
            state <= DWAIT;
            fix_src <= (op == OP_DIV) ? FX_SRTQ : FX_SRTR;
          end else if (iss_special) begin
            state <= FIX;
            if (b_info.zero) fix_src <= (op == OP_DIV) ? FX_ONES : FX_A;
            else             fix_src <= (op == OP_DIV) ? FX_AMAG : FX_ZERO;
          end
        end
        MUL: begin
          pass <= pass + 3'd1;
          if (pass == 3'(mul_last_q)) state <= MUL_LAST;
        end
        MUL_LAST: state <= RESP;
        FAST: begin
          pass <= pass + 3'd1;
          if (pass == 3'd4) state <= FAST_LAST;
        end
        FAST_LAST: begin
          if (op_q == OP_REM) state <= QB;
          else begin state <= FIX; fix_src <= FX_FASTQ; end
        end
        QB:   state <= RSUB;
        RSUB: begin state <= FIX; fix_src <= FX_ACC; end
        RGEN: if (div_done) state <= INC;
        INC:  state <= CAMWR;
        CAMWR: begin state <= FAST; pass <= 3'd0; end
        DWAIT: if (div_done) state <= FIX;
        FIX:  state <= RESP;
        default: state <= IDLE;
      endcase
    end
  end

  // ----------------------------------------------------------------- result
  // After n = mul_last_q+1 passes, acc holds the product shifted right by
  // 16(n-1) and the top 16(n-1) bits of lo hold the bits shifted out.
  logic [2*XLEN-1:0]        prod;
  logic [WIDE_W+XLEN-1:0]   accl;
  logic [6:0]               psh;
  assign accl = {acc, lo};
  assign psh  = 7'(XLEN - 16 * int'(mul_last_q));
  assign prod = sgn_q ? (2*XLEN)'($signed(accl) >>> psh) : (2*XLEN)'(accl >> psh);

  always_comb begin
    out_valid = p2 || state == RESP;
    overflow  = 1'b0;
    if (p2) begin
      result = pk;
    end else if (mull_q) begin
      result   = prod[XLEN-1:0];
      overflow = (state == RESP) &&
                 (sgn_q ? (prod[2*XLEN-1:XLEN-1] != '0 && prod[2*XLEN-1:XLEN-1] != '1)
                        : (prod[2*XLEN-1:XLEN] != '0));
    end else begin
      result = acc[XLEN-1:0];
    end
  end

  // A packed result and the response of a multi-cycle instruction never
  // coincide: a non-packed instruction is not accepted behind a packed one.
  assert property (@(posedge clk) disable iff (!rst_n) !(p2 && state == RESP));
  // The divider is only started when idle.
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

endmodule
