// tb_div_loop: application-style division workload on the full unit.
//
// Models an inner loop that divides by a few recurring small divisors. Every
// quotient and remainder (DIV and REM, signed and unsigned) is checked
// against ordinary arithmetic, and every latency against the unit's clock
// counts for the path the CAM lookup selected (sampled from `cam_hit` in the
// issue clock).
//
//   Phase 1: 1000 divisions, 95% by one of four divisors of at most 13 bits,
//            5% by random large divisors. Only the first division by each
//            small divisor may generate a reciprocal; every later one must
//            hit the 8-entry CAM and take the fast path. Prints the average
//            clocks per division next to what the same divisions would take
//            through the SRT path alone.
//   Phase 2: 1000 more, where 10% are one-time small divisors that are
//            never used again. These fill the free entries and then evict
//            under pseudo-LRU; the testbench counts how often one of the
//            four recurring reciprocals was lost and had to be regenerated.
module tb_div_loop;
  import mdu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, ready, is_signed, pk_high, out_valid, overflow, cam_hit;
  op_e  op;
  logic [1:0] sela, selb;
  logic [3:0][63:0] srca_bus, srcb_bus;
  logic [63:0] result;
  logic [6:0] srca_0_cnt, srcb_0_cnt;

  mdu_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lzc(input logic [63:0] v);
    for (int i = 63; i >= 0; i--) if (v[i]) return 63 - i;
    return 64;
  endfunction

  // One division by magnitude bm (negated at random when signed); returns
  // the clocks from issue to result and whether the CAM hit at issue.
  task automatic divide(input logic [63:0] bm, output int lat, output bit hit);
    logic [63:0] a, b, exp, ma, mb;
    logic s, rem, na, nb, short_b;
    int t0, expl;
    a = {$urandom, $urandom};
    s = 1'($urandom);
    rem = ($urandom_range(0, 3) == 0);
    b = (s && $urandom_range(0, 1)) ? -bm : bm;
    na = s && a[63]; nb = s && b[63];
    ma = na ? -a : a; mb = nb ? -b : b;
    exp = rem ? ma % mb : ma / mb;
    if (rem ? na : (na ^ nb)) exp = -exp;
    short_b = (mb < 64'd8192);
    op = rem ? OP_REM : OP_DIV; is_signed = s;
    srca_bus[0] = a; srcb_bus[0] = b;
    in_valid = 1;
    #1;
    hit = cam_hit;
    t0 = cyc;
    @(posedge clk); #1;
    in_valid = 0;
    while (!out_valid && cyc - t0 < 200) begin @(posedge clk); #1; end
    lat = cyc - t0;
    if (!short_b)  expl = (lzc(mb) + 3) / 2 + 4;
    else if (hit)  expl = rem ? 9 : 7;
    else           expl = (lzc(mb) + 19) / 2 + (rem ? 14 : 12);
    checks += 2;
    if (result !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h rem=%0d s=%0d got=%h exp=%h", a, b, rem, s, result, exp);
    end
    if (lat != expl) begin
      failures++;
      $display("FAIL latency %0d expected %0d (b=%h hit=%0d)", lat, expl, b, hit);
    end
    @(posedge clk); #1;
  endtask

  function automatic logic [63:0] large_divisor();
    logic [63:0] v;
    v = {$urandom, $urandom} >> $urandom_range(0, 48);
    v = v | 64'h10000;
    if (v[63]) v = v >> 1;
    return v;
  endfunction

  initial begin
    logic [63:0] divs [4];
    bit seen [4];
    int lat, total = 0, srt_equiv = 0, n_fast = 0, n_first = 0, n_large = 0;
    int n_once = 0, n_lost = 0;
    bit hit;
    rst_n = 0; in_valid = 0; op = OP_DIV; is_signed = 0; pk_high = 0;
    sela = 0; selb = 0; srca_bus = '0; srcb_bus = '0;
    divs = '{64'd10, 64'd3, 64'd1000, 64'd7919};
    seen = '{0, 0, 0, 0};
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;

    // Phase 1
    for (int t = 0; t < 1000; t++) begin
      logic [63:0] bm;
      int idx;
      idx = $urandom_range(0, 3);
      if ($urandom_range(0, 99) < 95) begin
        bm = divs[idx];
        divide(bm, lat, hit);
        checks++;
        if (hit == !seen[idx]) begin
          failures++;
          $display("FAIL divisor %0d: hit=%0d after %0s use", bm, hit, seen[idx] ? "an earlier" : "no");
        end
        if (hit) n_fast++; else n_first++;
        seen[idx] = 1;
      end else begin
        bm = large_divisor();
        divide(bm, lat, hit);
        n_large++;
      end
      total += lat;
      srt_equiv += (lzc(bm) + 3) / 2 + 4;
    end
    $display("phase 1: fast=%0d first-use=%0d large=%0d", n_fast, n_first, n_large);
    $display("clocks per division: %0d.%02d with the reciprocal CAM, %0d.%02d through SRT alone",
             total / 1000, (total % 1000) / 10, srt_equiv / 1000, (srt_equiv % 1000) / 10);
    checks++;
    if (n_first != 4 || n_fast == 0 || n_large == 0) begin
      failures++;
      $display("FAIL workload mix not exercised");
    end

    // Phase 2
    total = 0;
    for (int t = 0; t < 1000; t++) begin
      logic [63:0] bm;
      if ($urandom_range(0, 99) < 10) begin
        do bm = 64'($urandom_range(2, 8191));
        while (bm == divs[0] || bm == divs[1] || bm == divs[2] || bm == divs[3]);
        divide(bm, lat, hit);
        n_once++;
      end else begin
        divide(divs[$urandom_range(0, 3)], lat, hit);
        if (!hit) n_lost++;
      end
      total += lat;
    end
    $display("phase 2: one-time divisors=%0d, recurring reciprocals regenerated=%0d, %0d.%02d clocks per division",
             n_once, n_lost, total / 1000, (total % 1000) / 10);
    checks++;
    if (n_once == 0) begin
      failures++;
      $display("FAIL no one-time divisors issued");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
