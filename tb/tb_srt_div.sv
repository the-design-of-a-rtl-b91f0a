// tb_srt_div: self-checking test of the radix-4 SRT divider.
// Random 64-bit dividends over divisors of every length (normalised by the
// testbench), plus reciprocal requests floor(2^80/B) for 13-bit and shorter
// divisors. The testbench accumulates the digits the divider emits,
// Q = 4Q + q, as the unit's second stage does, and applies the final -1 the
// divider requests. Quotient and remainder are compared with the simulator's
// own division, and the cycle count from `start` to `done` with N+2, where
// N = floor((s+3)/2) for a division and floor((s+19)/2) for a reciprocal
// (s = leading zeros of the divisor).
module tb_srt_div;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, recip, busy, done, q_valid, q_first, q_neg;
  logic signed [2:0] q_digit;
  logic [63:0] a, b, d_norm, rem;
  logic [5:0]  s;
  logic [79:0] quot, qacc;
  int ndig;
  int checks = 0, failures = 0;

  srt_div dut (.*);

  // Quotient accumulation outside the divider.
  always @(posedge clk) begin
    if (q_valid) begin
      qacc <= (q_first ? 80'd0 : qacc << 2) + 80'(signed'(q_digit));
      ndig <= q_first ? 1 : ndig + 1;
    end
  end
  assign quot = qacc - 80'(q_neg);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] x, input logic [63:0] y, input logic r);
    int lz, cyc, n;
    logic [80:0] eq, er;
    lz = 0;
    for (int i = 63; i >= 0; i--) begin if (y[i]) break; lz++; end
    a = x; b = y; s = 6'(lz); d_norm = y << lz; recip = r;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    if (r) begin
      eq = (81'd1 << 80) / 81'(y);
      er = (81'd1 << 80) % 81'(y);
      n  = (lz + 19) / 2;
    end else begin
      eq = 81'(x / y);
      er = 81'(x % y);
      n  = (lz + 3) / 2;
    end
    checks += 3;
    if (ndig != n) begin
      failures++;
      $display("FAIL %0d digits, expected %0d", ndig, n);
    end
    if (81'(quot) !== eq || 81'(rem) !== er) begin
      failures++;
      $display("FAIL x=%h y=%h recip=%0d q=%h exp %h r=%h exp %h", x, y, r, quot, eq, rem, er);
    end
    if (cyc != n + 2) begin
      failures++;
      $display("FAIL cycles %0d expected %0d (s=%0d)", cyc, n + 2, lz);
    end
  endtask

  initial begin
    rst_n = 0; start = 0; recip = 0; a = 0; b = 1; d_norm = 64'h8000_0000_0000_0000; s = 63;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(64'd100, 64'd7, 0);
    run(64'hffff_ffff_ffff_ffff, 64'd1, 0);
    run(64'hffff_ffff_ffff_ffff, 64'hffff_ffff_ffff_ffff, 0);
    run(64'h0, 64'd3, 0);
    run(64'd3, 64'd2, 1);
    run(64'd0, 64'd8191, 1);
    run(64'd0, 64'd4096, 1);
    for (int t = 0; t < 1500; t++) begin
      logic [63:0] x, y;
      int len;
      x = {$urandom, $urandom};
      if (t % 5 == 0) x = x >> $urandom_range(0, 63);
      len = $urandom_range(1, 64);
      y = {$urandom, $urandom} >> (64 - len);
      y[len-1] = 1'b1;
      run(x, y, 0);
    end
    for (int t = 0; t < 300; t++) begin
      logic [63:0] y;
      y = 64'($urandom_range(2, 8191));
      run(64'd0, y, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
