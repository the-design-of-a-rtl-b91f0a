// tb_operand_latch: self-checking test of the source selector and latch.
// In a load cycle the output must equal the selected source at once; in the
// following cycles it must hold that value while the sources keep changing.
module tb_operand_latch;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, load;
  logic [3:0][63:0] src;
  logic [1:0] sel;
  logic [63:0] q;
  int checks = 0, failures = 0;

  operand_latch dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] held;
    rst_n = 0; load = 0; sel = 0; src = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      foreach (src[i]) src[i] = {$urandom, $urandom};
      sel = 2'($urandom);
      load = 1;
      #1;
      held = src[sel];
      checks++;
      if (q !== held) begin failures++; $display("FAIL bypass q=%h exp %h", q, held); end
      @(posedge clk); #1;
      load = 0;
      repeat ($urandom_range(1, 3)) begin
        foreach (src[i]) src[i] = {$urandom, $urandom};
        sel = 2'($urandom);
        #1;
        checks++;
        if (q !== held) begin failures++; $display("FAIL hold q=%h exp %h", q, held); end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
