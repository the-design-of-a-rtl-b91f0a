// tb_mul_stage2: self-checking test of the multiplier's second stage.
// Drives random redundant pairs (a random value split into sum and carry
// vectors) and checks every operation one clock later against a reference:
// FIRST and the shift-accumulate of four 64x16 products (the full 128-bit
// product must appear in {acc, lo}), SUB, ADD with carry-in, and the packed
// four-way 32-bit additions with low/high half selection.
module tb_mul_stage2;
  import mdu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, acc_signed, pk_high, cin;
  s2op_e op;
  logic [79:0] sum80, carry80, x, y, acc;
  logic [3:0][31:0] psum, pcarry;
  logic [63:0] lo, pk;
  int checks = 0, failures = 0;

  mul_stage2 dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present value v as a random sum/carry pair.
  task automatic split(input logic [79:0] v);
    logic [79:0] r;
    r = {16'($urandom), $urandom, $urandom};
    sum80 = v - r;
    carry80 = r;
  endtask

  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; op = S2_HOLD; acc_signed = 0; pk_high = 0; cin = 0;
    sum80 = 0; carry80 = 0; x = 0; y = 0; psum = '0; pcarry = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      logic [63:0] a, b;
      logic        sg;
      logic [127:0] prod;
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; sg = 1'($urandom);
      prod = sg ? 128'($signed(a) * $signed(b)) : 128'(a) * 128'(b);
      // four 64x16 partial products, shift-accumulated
      for (int j = 0; j < 4; j++) begin
        logic signed [80:0] pa, pb;
        pa = sg ? 81'($signed(a)) : 81'(a);
        pb = (sg && j == 3) ? 81'($signed(b[16*j +: 16])) : 81'(b[16*j +: 16]);
        split(80'(pa * pb));
        op = (j == 0) ? S2_FIRST : S2_ACC;
        acc_signed = sg;
        @(posedge clk); #1;
      end
      chk({acc, lo[63:16]}, prod, "mul64");
      // subtraction
      x = {16'($urandom), $urandom, $urandom};
      begin
        logic [79:0] v;
        v = {16'($urandom), $urandom, $urandom};
        split(v);
        op = S2_SUB;
        @(posedge clk); #1;
        chk(128'(acc), 128'(80'(x - v)), "sub");
      end
      // addition with carry-in
      x = {16'($urandom), $urandom, $urandom};
      y = {16'($urandom), $urandom, $urandom};
      cin = 1'($urandom);
      op = S2_ADD;
      @(posedge clk); #1;
      chk(128'(acc), 128'(80'(x + y + 80'(cin))), "add");
      // hold
      begin
        logic [79:0] keep;
        keep = acc;
        op = S2_HOLD;
        @(posedge clk); #1;
        chk(128'(acc), 128'(keep), "hold");
      end
      // packed
      begin
        logic [63:0] exp;
        pk_high = 1'($urandom);
        for (int k = 0; k < 4; k++) begin
          logic [31:0] p;
          p = $urandom; pcarry[k] = $urandom; psum[k] = p - pcarry[k];
          exp[16*k +: 16] = pk_high ? p[31:16] : p[15:0];
        end
        op = S2_PACKED;
        @(posedge clk); #1;
        chk(128'(pk), 128'(exp), "packed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
