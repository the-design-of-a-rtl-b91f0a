// tb_mul_stage1: self-checking test of the multiplier's first stage.
// Packed mode: each slice's registered sum + carry (mod 2^32) must be the
// 16x16 product of its segments. 64x16 mode: sum80 + carry80 (mod 2^80)
// must be the product of the 64-bit multiplicand (sign- or zero-extended)
// and the selected 16-bit multiplier segment, taken from srcb or from the
// 80-bit reciprocal input. Results are checked one clock after the operands
// are applied, which is the stage's latency.
module tb_mul_stage1;
  import mdu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        en, mode80, a_signed, b_signed, m_ext, m_recip;
  logic [2:0]  m_seg;
  logic [63:0] srca, srcb;
  logic [79:0] b_recip;
  logic [3:0][31:0] rmulsum, rmulcary;
  logic [79:0] sum80, carry80;
  int checks = 0, failures = 0;

  mul_stage1 dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [79:0] ref80(input logic [63:0] a, input logic asg,
                                        input logic [15:0] m, input logic msg);
    logic signed [80:0] ax, mx;
    ax = asg ? 81'($signed(a)) : 81'(a);
    mx = msg ? 81'($signed(m)) : 81'(m);
    return 80'(ax * mx);
  endfunction

  initial begin
    en = 1; m_ext = 0; m_recip = 0; m_seg = 0; b_recip = '0;
    for (int t = 0; t < 3000; t++) begin
      srca = {$urandom, $urandom};
      srcb = {$urandom, $urandom};
      b_recip = {16'($urandom), $urandom, $urandom};
      if (t % 7 == 0) srca = 64'h8000_0000_0000_0000;
      if (t % 11 == 0) srcb = '1;
      a_signed = 1'($urandom);
      b_signed = 1'($urandom);
      mode80 = t[0];
      m_recip = 1'($urandom);
      m_seg = m_recip ? 3'($urandom_range(0, 4)) : 3'($urandom_range(0, 3));
      begin
        logic [15:0] m;
        m = m_recip ? b_recip[16*m_seg +: 16] : srcb[16*m_seg[1:0] +: 16];
        m_ext = b_signed & m[15];
      end
      @(posedge clk); #1;
      if (!mode80) begin
        for (int k = 0; k < 4; k++) begin
          logic [31:0] exp;
          logic [15:0] x, y;
          x = srca[16*k +: 16]; y = srcb[16*k +: 16];
          exp = 32'(ref80({{48{a_signed & x[15]}}, x}, 1'b1, y, b_signed));
          checks++;
          if (rmulsum[k] + rmulcary[k] !== exp) begin
            failures++;
            $display("FAIL packed k=%0d a=%h b=%h got=%h exp=%h", k, x, y, rmulsum[k] + rmulcary[k], exp);
          end
        end
      end else begin
        logic [15:0] m;
        logic [79:0] exp;
        m = m_recip ? b_recip[16*m_seg +: 16] : srcb[16*m_seg[1:0] +: 16];
        exp = ref80(srca, a_signed, m, m_ext);
        checks++;
        if (sum80 + carry80 !== exp) begin
          failures++;
          $display("FAIL 64x16 a=%h m=%h got=%h exp=%h", srca, m, sum80 + carry80, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
