// tb_mul_slice: self-checking test of one 16x16 Booth slice in packed mode.
// Random and corner 16-bit operands, signed and unsigned; the redundant
// result sum + carry (mod 2^32) must equal the 32-bit product computed with
// ordinary arithmetic. The slice is combinational; a watchdog bounds the run.
module tb_mul_slice;
  logic [31:0] mcand, sum, carry;
  logic [15:0] a, b;
  logic        sg;
  logic [6:0]  xout;
  int checks = 0, failures = 0;

  mul_slice #(.IDX(0)) dut (
    .mode80(1'b0), .mcand(mcand), .mcand_lsb_in(1'b0), .mplier(b),
    .mplier_ext(sg & b[15]), .xin(7'd0), .xout(xout), .sum(sum), .carry(carry));

  assign mcand = {{16{sg & a[15]}}, a};

  task automatic check_one(input logic [15:0] x, input logic [15:0] y, input logic s);
    logic [31:0] exp;
    a = x; b = y; sg = s;
    #1;
    if (s) exp = 32'($signed(x) * $signed(y));
    else   exp = 32'(x) * 32'(y);
    checks++;
    if (sum + carry !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h signed=%0d got=%h exp=%h", x, y, s, sum + carry, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [6];
    corner = '{16'h0000, 16'h0001, 16'hffff, 16'h8000, 16'h7fff, 16'h5555};
    foreach (corner[i]) foreach (corner[j]) begin
      check_one(corner[i], corner[j], 1'b0);
      check_one(corner[i], corner[j], 1'b1);
    end
    repeat (2000) check_one(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
