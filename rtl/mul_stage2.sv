// mul_stage2: second stage of the multiplier, the result accumulator shared
// by multiplication and division.
//
// An 80-bit carry-propagate adder takes its inputs from a 3:2 carry-save
// counter, so that the redundant sum/carry pair from the first stage can be
// added to a third operand in one pass. The third operand is selected per
// operation:
//   S2_FIRST   acc <= sum80 + carry80
//   S2_ACC     acc <= (acc >> 16) + sum80 + carry80; the 16 bits shifted out
//              of acc enter the top of the 64-bit `lo` register, which shifts
//              right by 16. After the passes of a 64x(16n) multiply, {acc, lo}
//              holds the product. The shift is arithmetic when `acc_signed`.
//   S2_SUB     acc <= x - (sum80 + carry80), formed as x + ~sum + ~carry + 2
//              (one +1 enters the free carry-vector LSB, one the adder's
//              carry-in)
//   S2_ADD     acc <= x + y + cin (SRT quotient digits as 4*acc + q,
//              increment, negation, final corrections)
//   S2_PACKED  four 32-bit additions of the per-slice vectors, with no
//              carries between slices; `pk_high` selects the upper or lower
//              16 bits of each product into `pk`.
// Each operation takes one clock; the results are registered.
//
// The adder width, the 3:2 counter in front of it and the shift-and-add of
// 64x16 products follow the unit's description. The operation encoding, the
// `lo` shift register and the separate 32-bit segment adders for the packed
// result are this design's choices.
module mul_stage2
  import mdu_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  s2op_e                   op,
  input  logic                    acc_signed,  // arithmetic shift of acc in S2_ACC
  input  logic                    pk_high,     // packed: return the high halves
  input  logic [WIDE_W-1:0]       sum80,
  input  logic [WIDE_W-1:0]       carry80,
  input  logic [NSLICE-1:0][31:0] psum,
  input  logic [NSLICE-1:0][31:0] pcarry,
  input  logic [WIDE_W-1:0]       x,
  input  logic [WIDE_W-1:0]       y,
  input  logic                    cin,
  output logic [WIDE_W-1:0]       acc,
  output logic [XLEN-1:0]         lo,
  output logic [XLEN-1:0]         pk
);

  logic [WIDE_W-1:0] p, q, r, cs_s, cs_k, cs_w, total, acc_sh;
  logic              k_lsb, c_in;

  assign acc_sh = {{16{acc_signed & acc[WIDE_W-1]}}, acc[WIDE_W-1:16]};

  always_comb begin
    p = '0; q = '0; r = '0; k_lsb = 1'b0; c_in = 1'b0;
    unique case (op)
      S2_FIRST: begin q = sum80; r = carry80; end
      S2_ACC:   begin p = acc_sh; q = sum80; r = carry80; end
      S2_SUB:   begin p = x; q = ~sum80; r = ~carry80; k_lsb = 1'b1; c_in = 1'b1; end
      S2_ADD:   begin p = x; q = y; c_in = cin; end
      default:  ;
    endcase
    cs_s  = p ^ q ^ r;
    cs_k  = (p & q) | (p & r) | (q & r);
    cs_w  = {cs_k[WIDE_W-2:0], k_lsb};
    total = cs_s + cs_w + WIDE_W'(c_in);
  end

  logic [XLEN-1:0] pk_next;
  always_comb begin
    for (int k = 0; k < NSLICE; k++) begin
      logic [31:0] prod;
      prod = psum[k] + pcarry[k];
      pk_next[16*k +: 16] = pk_high ? prod[31:16] : prod[15:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      lo  <= '0;
      pk  <= '0;
    end else begin
      unique case (op)
        S2_FIRST, S2_SUB, S2_ADD: acc <= total;
        S2_ACC: begin
          acc <= total;
          lo  <= {acc[15:0], lo[XLEN-1:16]};
        end
        S2_PACKED: pk <= pk_next;
        default: ;
      endcase
    end
  end

endmodule
