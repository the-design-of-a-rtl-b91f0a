// srt_div: radix-4 SRT divider for unsigned 64-bit magnitudes, also used to
// compute the 80-bit reciprocals of small divisors.
//
// Algorithm. The divisor arrives normalised, D = B << s with D[63] = 1, so
// that d = D / 2^64 lies in [1/2, 1). The dividend X (the 64-bit magnitude A,
// or 2^80 when `recip` is set) is scaled so that the first partial remainder
// w0 = X * 2^s / 2^(64+2N) is below d/2; this fixes the number of iterations
// at N = floor((s+3)/2) for a division and N = floor((s+19)/2) for a
// reciprocal. Each iteration computes w' = 4w - q*d with a digit q in
// {-2,-1,0,+1,+2}. The partial remainder is kept in carry-save form (two
// 70-bit vectors, 3 integer and 67 fraction bits) and updated by a single
// 3:2 counter; -q*d enters as a ones' complement with its +1 in the free
// carry LSB. The digit is selected from a 7-bit estimate of 4w (the sum of
// the top 7 bits of both vectors: 3 integer and 4 fraction bits) and the
// four divisor bits below the leading one. The selection thresholds are
// m_k(j) = ceil(max((3k-2)*Dl, (3k-2)*(Dl+1)) / 6) in units of 1/16, for
// k = 2, 1, 0, -1, with Dl = 16 + j and d in [Dl/32, (Dl+1)/32). They are the
// smallest values that keep |w| <= 2d/3 whatever the truncation error.
// The divider keeps no quotient register: each digit is presented on
// `q_digit` while `q_valid` is high, and the user accumulates Q = 4Q + q
// (in the unit, the multiplier's second-stage adder does this), starting
// from zero when `q_first` is high. After the last iteration the remainder
// is X - Q*B = (S + C) >> (s+3); if it is negative, B is added to it and
// `q_neg` tells the user to decrease Q by one.
//
// Timing: `start` loads the operands (1 cycle), N iterations follow
// (1 cycle each, one digit each), and one final cycle resolves the
// remainder and raises `done` for one cycle; `rem` and `q_neg` then hold
// until the next start. A division takes N+2 = 3..35 cycles; a reciprocal of
// a 13-bit or shorter divisor (s >= 51) takes 37..43 cycles.
//
// The radix, digit set, carry-save remainder, the reciprocal computed as a
// division with a dividend of 1, and accumulating the quotient outside the
// divider follow the unit's description. The selection constants, the
// scaling, and resolving the final remainder inside this block rather than
// in the multiplier's second stage are this design's choices. Leading zeros
// of the dividend are not used to shorten the iteration count.
module srt_div
  import mdu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,   // load operands (ignored while busy)
  input  logic              recip,   // 1: compute floor(2^80 / B); 0: A / B
  input  logic [XLEN-1:0]   a,       // dividend magnitude
  input  logic [XLEN-1:0]   b,       // divisor magnitude, non-zero
  input  logic [XLEN-1:0]   d_norm,  // b << s, bit 63 set
  input  logic [5:0]        s,       // leading zeros of b
  output logic              busy,
  output logic              done,    // one cycle: rem and q_neg are valid
  output logic              q_valid, // q_digit is a quotient digit
  output logic              q_first, // ... and the most significant one
  output logic signed [2:0] q_digit, // -2..+2
  output logic              q_neg,   // remainder was negative: Q - 1
  output logic [XLEN-1:0]   rem
);

  localparam int unsigned W  = 70;  // partial remainder width

  typedef enum logic [1:0] {IDLE, ITER, FINAL} state_e;

  state_e            state;
  logic [W-1:0]      ws, wc;       // partial remainder, carry-save
  logic [W-1:0]      dv;           // d scaled to 67 fraction bits
  logic              first;
  logic [6:0]        iter;
  logic [5:0]        s_q;
  logic [XLEN-1:0]   b_q;

  // Quotient digit selection.
  function automatic logic signed [7:0] thr(input int k, input int dl);
    int lo, m;
    lo = (3*k - 2) * dl;
    if ((3*k - 2) * (dl + 1) > lo) lo = (3*k - 2) * (dl + 1);
    // ceiling division by 6 for either sign
    m = (lo >= 0) ? (lo + 5) / 6 : -((-lo) / 6);
    return 8'(m);
  endfunction

  logic [W-1:0]       ys, yc;
  logic signed [6:0]  yhat;
  logic signed [2:0]  qd;
  logic [W-1:0]       mult, ns, nk;
  int                 dl;

  always_comb begin
    ys   = ws << 2;
    yc   = wc << 2;
    yhat = 7'(ys[W-1 -: 7] + yc[W-1 -: 7]);
    dl   = 16 + int'(dv[65:62]);
    if      (8'(yhat) >= thr( 2, dl)) qd = 3'sd2;
    else if (8'(yhat) >= thr( 1, dl)) qd = 3'sd1;
    else if (8'(yhat) >= thr( 0, dl)) qd = 3'sd0;
    else if (8'(yhat) >= thr(-1, dl)) qd = -3'sd1;
    else                              qd = -3'sd2;
    // -q*d as an addend; for q > 0 the ones' complement, +1 in the carry LSB
    unique case (qd)
      3'sd2:   mult = ~(dv << 1);
      3'sd1:   mult = ~dv;
      -3'sd1:  mult = dv;
      -3'sd2:  mult = dv << 1;
      default: mult = '0;
    endcase
    ns = ys ^ yc ^ mult;
    nk = ((ys & yc) | (ys & mult) | (yc & mult)) << 1;
    nk[0] = (qd > 0);
  end

  // Final resolution of the remainder.
  logic signed [W-1:0]   wfull, wshift;
  logic [XLEN-1:0]       r_raw;
  always_comb begin
    wfull  = signed'(ws + wc);
    wshift = wfull >>> (7'(s_q) + 7'd3);
    r_raw  = wshift[XLEN-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      ws    <= '0;
      wc    <= '0;
      dv    <= '0;
      first <= 1'b0;
      iter  <= '0;
      s_q   <= '0;
      b_q   <= '0;
      done  <= 1'b0;
      q_neg <= 1'b0;
      rem   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          dv    <= {3'b000, d_norm, 3'b000};
          wc    <= '0;
          first <= 1'b1;
          s_q   <= s;
          b_q   <= b;
          if (recip) begin
            iter <= 7'((int'(s) + 19) / 2);
            ws   <= s[0] ? (W'(1) << 64) : (W'(1) << 65);
          end else begin
            iter <= 7'((int'(s) + 3) / 2);
            ws   <= s[0] ? W'(a) : (W'(a) << 1);
          end
          state <= ITER;
        end
        ITER: begin
          ws    <= ns;
          wc    <= nk;
          first <= 1'b0;
          iter  <= iter - 7'd1;
          if (iter == 7'd1) state <= FINAL;
        end
        FINAL: begin
          q_neg <= (wfull < 0);
          rem   <= (wfull < 0) ? r_raw + b_q : r_raw;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy    = (state != IDLE);
  assign q_valid = (state == ITER);
  assign q_first = q_valid && first;
  assign q_digit = qd;

endmodule
