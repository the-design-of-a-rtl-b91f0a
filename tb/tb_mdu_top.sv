// tb_mdu_top: end-to-end self-checking test of the multiply/divide unit.
//
// Issues a random mix of PACKED_MULL, MULL, DIV and REM, signed and
// unsigned, with operands drawn so that every mechanism of the unit is
// exercised: back-to-back packed multiplies (one per clock), MULL with and
// without overflow, MULL with fewer than four multiplier segments, MULL
// where A has fewer segments and becomes the multiplier, divisors 0 and
// +-1, small divisors that miss the
// reciprocal CAM (reciprocal generation), that hit it (fast path), and more
// distinct small divisors than the CAM holds (replacement), and large
// divisors (SRT division). Every result is compared with a reference
// computed here with ordinary arithmetic, and every latency with the
// unit's clock counts: 2 for PACKED_MULL, passes+1 (2..5) for MULL, 2 for the 0/+-1
// divisors, 7 for a fast DIV and 9 for a fast REM, N+4 for an SRT division
// (N = floor((s+3)/2), s = leading zeros of |B|), and N'+12 (DIV) or N'+14
// (REM) for a first division by a small divisor, N' = floor((s+19)/2)
// being the reciprocal's iteration count (47..54 clocks). Each mechanism is counted and must occur.
module tb_mdu_top;
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

  int checks = 0, failures = 0;
  int n_pmull_b2b = 0, n_mull = 0, n_mull_short = 0, n_mull_swap = 0, n_ovf = 0, n_noovf = 0, n_div0 = 0, n_div1 = 0;
  int n_fast = 0, n_fast_rem = 0, n_recip = 0, n_replace = 0, n_srt = 0, n_neg = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference
  function automatic logic [63:0] ref_pmull(input logic [63:0] a, b, input logic s, hi);
    logic [63:0] r;
    for (int k = 0; k < 4; k++) begin
      logic [31:0] p;
      p = s ? 32'($signed(a[16*k +: 16]) * $signed(b[16*k +: 16]))
            : 32'(a[16*k +: 16]) * 32'(b[16*k +: 16]);
      r[16*k +: 16] = hi ? p[31:16] : p[15:0];
    end
    return r;
  endfunction

  // Significant 16-bit segments of a multiplier operand.
  function automatic int nseg(input logic [63:0] v, input logic s);
    int n;
    n = 4;
    for (int j = 2; j >= 0; j--) begin
      logic [63:0] top;
      if (s) begin top = $signed(v) >>> (16 * j + 15); if (top == '0 || top == '1) n = j + 1; end
      else begin top = v >> (16 * (j + 1)); if (top == '0) n = j + 1; end
    end
    return n;
  endfunction

  function automatic logic [127:0] ref_mull(input logic [63:0] a, b, input logic s);
    return s ? 128'($signed(a) * $signed(b)) : 128'(a) * 128'(b);
  endfunction

  function automatic logic [63:0] ref_div(input logic [63:0] a, b, input logic s, rem);
    logic [63:0] ma, mb, q, r;
    logic na, nb;
    if (b == 0) return rem ? a : '1;
    na = s && a[63]; nb = s && b[63];
    ma = na ? -a : a; mb = nb ? -b : b;
    q = ma / mb; r = ma % mb;
    if (na ^ nb) q = -q;
    if (na) r = -r;
    return rem ? r : q;
  endfunction

  function automatic int lzc(input logic [63:0] v);
    for (int i = 63; i >= 0; i--) if (v[i]) return 63 - i;
    return 64;
  endfunction

  // --------------------------------------------------------------- driving
  task automatic put_operands(input logic [63:0] a, b);
    foreach (srca_bus[i]) srca_bus[i] = {$urandom, $urandom};
    foreach (srcb_bus[i]) srcb_bus[i] = {$urandom, $urandom};
    sela = 2'($urandom); selb = 2'($urandom);
    srca_bus[sela] = a; srcb_bus[selb] = b;
  endtask

  // Issue one instruction, wait for its result, check value and latency.
  task automatic one(input op_e o, input logic [63:0] a, b, input logic s, hi,
                     input int lat_min, input int lat_max, input string what);
    int t0, lat;
    logic [63:0] exp;
    logic expo;
    while (!ready) begin @(posedge clk); #1; end
    op = o; is_signed = s; pk_high = hi; put_operands(a, b);
    in_valid = 1;
    t0 = cyc;
    @(posedge clk); #1;
    in_valid = 0;
    foreach (srca_bus[i]) srca_bus[i] = {$urandom, $urandom};
    while (!out_valid) begin
      @(posedge clk); #1;
      if (cyc - t0 > 200) break;
    end
    lat = cyc - t0;
    expo = 0;
    unique case (o)
      OP_PMULL: exp = ref_pmull(a, b, s, hi);
      OP_MULL: begin
        logic [127:0] p;
        p = ref_mull(a, b, s);
        exp = p[63:0];
        expo = s ? (p[127:63] != '0 && p[127:63] != '1) : (p[127:64] != '0);
      end
      OP_DIV:  exp = ref_div(a, b, s, 0);
      default: exp = ref_div(a, b, s, 1);
    endcase
    checks++;
    if (!out_valid || result !== exp || (o == OP_MULL && overflow !== expo)) begin
      failures++;
      $display("FAIL %s op=%s a=%h b=%h s=%0d got=%h exp=%h ovf=%0d exp %0d",
               what, o.name(), a, b, s, result, exp, overflow, expo);
    end
    checks++;
    if (lat < lat_min || lat > lat_max) begin
      failures++;
      $display("FAIL %s latency %0d not in [%0d,%0d] (a=%h b=%h)", what, lat, lat_min, lat_max, a, b);
    end
    if (o == OP_MULL) begin n_mull++; if (expo) n_ovf++; else n_noovf++; end
    @(posedge clk); #1;
  endtask

  // A burst of packed multiplies issued on consecutive clocks; results must
  // come back on consecutive clocks, two clocks after each issue.
  task automatic packed_burst(input int n);
    logic [63:0] exp [$];
    int t_issue [$];
    int got = 0;
    while (!ready) begin @(posedge clk); #1; end
    fork
      begin
        for (int i = 0; i < n; i++) begin
          logic [63:0] a, b;
          logic s, hi;
          a = {$urandom, $urandom}; b = {$urandom, $urandom};
          s = 1'($urandom); hi = 1'($urandom);
          op = OP_PMULL; is_signed = s; pk_high = hi; put_operands(a, b);
          in_valid = 1;
          exp.push_back(ref_pmull(a, b, s, hi));
          t_issue.push_back(cyc);
          @(posedge clk); #1;
        end
        in_valid = 0;
      end
      begin
        while (got < n) begin
          @(posedge clk); #1;
          if (out_valid) begin
            logic [63:0] e;
            int ti;
            e = exp.pop_front();
            ti = t_issue.pop_front();
            checks++;
            if (result !== e || cyc - ti != 2) begin
              failures++;
              $display("FAIL packed burst got=%h exp=%h latency=%0d", result, e, cyc - ti);
            end
            got++;
            if (got > 1) n_pmull_b2b++;
          end
        end
      end
    join
  endtask

  // Small divisors: more distinct values than the CAM has entries.
  logic [63:0] smalls [12];

  initial begin
    rst_n = 0; in_valid = 0; op = OP_MULL; is_signed = 0; pk_high = 0;
    sela = 0; selb = 0; srca_bus = '0; srcb_bus = '0;
    foreach (smalls[i]) smalls[i] = 64'($urandom_range(2, 8191));
    smalls[0] = 64'd10; smalls[1] = 64'd8191; smalls[2] = 64'd4096; smalls[3] = 64'd3;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;

    packed_burst(6);
    one(OP_MULL, 64'd3, 64'd5, 0, 0, 2, 2, "mull small");
    one(OP_MULL, '1, '1, 0, 0, 5, 5, "mull unsigned overflow");
    one(OP_MULL, '1, '1, 1, 0, 2, 2, "mull -1*-1");
    one(OP_MULL, 64'h1_2345_6789, 64'h1_8000, 1, 0, 3, 3, "mull signed 2 segments");
    one(OP_MULL, '1, 64'h1_8000, 1, 0, 2, 2, "mull operands exchanged");
    one(OP_MULL, 64'h8000_0000_0000_0000, '1, 1, 0, 2, 2, "mull signed overflow");
    one(OP_DIV, 64'd77, 64'd0, 0, 0, 2, 2, "div by 0");
    one(OP_REM, 64'd77, 64'd0, 1, 0, 2, 2, "rem by 0");
    one(OP_DIV, -64'd77, '1, 1, 0, 2, 2, "div by -1");
    one(OP_REM, 64'd77, 64'd1, 0, 0, 2, 2, "rem by 1");

    for (int t = 0; t < 400; t++) begin
      int kind;
      logic [63:0] a, b;
      logic s;
      kind = $urandom_range(0, 9);
      a = {$urandom, $urandom};
      if ($urandom_range(0, 3) == 0) a = a >> $urandom_range(0, 63);
      s = 1'($urandom);
      unique case (kind)
        0: packed_burst($urandom_range(1, 4));
        1: begin
          int np, npa;
          b = {$urandom, $urandom} >> $urandom_range(0, 63);
          if ($urandom_range(0, 1) == 0) a = a >> 40;
          if (s && $urandom_range(0, 1)) b = -b;
          if ($urandom_range(0, 3) == 0) begin
            logic [63:0] tmp;
            tmp = a; a = b; b = tmp;
          end
          np = nseg(b, s);
          npa = nseg(a, s);
          if (npa < np) begin np = npa; n_mull_swap++; end
          if (np < 4) n_mull_short++;
          one(OP_MULL, a, b, s, 0, np + 1, np + 1, "mull");
        end
        2, 3, 4, 5: begin
          op_e o;
          logic [63:0] bm;
          logic hit_before;
          int lmin, lmax;
          o = $urandom_range(0, 1) ? OP_DIV : OP_REM;
          bm = smalls[$urandom_range(0, (t < 200) ? 5 : 11)];
          b = (s && $urandom_range(0, 1)) ? -bm : bm;
          // Look the divisor up before issuing to know which path it takes.
          hit_before = 0;
          for (int i = 0; i < 8; i++)
            if (dut.u_cam.valid[i] && dut.u_cam.tag[i] == bm[12:0]) hit_before = 1;
          if (hit_before) begin
            lmin = (o == OP_DIV) ? 7 : 9; lmax = lmin;
            n_fast++; if (o == OP_REM) n_fast_rem++;
          end else begin
            lmin = (lzc(bm) + 19) / 2 + ((o == OP_DIV) ? 12 : 14); lmax = lmin;
            n_recip++;
            if (dut.u_cam.valid == 8'hff) n_replace++;
          end
          if (s && (a[63] ^ b[63])) n_neg++;
          one(o, a, b, s, 0, lmin, lmax, hit_before ? "fast div" : "recip div");
        end
        6, 7, 8: begin
          int n;
          logic [63:0] bm;
          bm = {$urandom, $urandom} >> $urandom_range(0, 50);
          bm[63 - lzc(bm) + ((bm < 64'd8192) ? 14 : 0)] = 1'b1;
          if (bm < 64'd8192) bm = 64'd8192;
          b = (s && $urandom_range(0, 1)) ? -bm : bm;
          if (s && b[63] && bm[63]) b = bm; // keep |B| = bm when bm has bit 63
          n = (lzc(s && b[63] ? -b : b) + 3) / 2;
          n_srt++;
          one($urandom_range(0, 1) ? OP_DIV : OP_REM, a, b, s, 0, n + 4, n + 4, "srt div");
        end
        default: begin
          b = $urandom_range(0, 1) ? 64'd0 : (s ? '1 : 64'd1);
          if (b == 0) n_div0++; else n_div1++;
          one($urandom_range(0, 1) ? OP_DIV : OP_REM, a, b, s, 0, 2, 2, "special div");
        end
      endcase
    end

    $display("mechanisms: mull with skipped segments=%0d", n_mull_short);
    checks++; if (n_mull_short == 0) begin failures++; $display("FAIL no shortened MULL"); end
    $display("mechanisms: mull with A as the multiplier=%0d", n_mull_swap);
    checks++; if (n_mull_swap == 0) begin failures++; $display("FAIL no exchanged MULL"); end
    $display("mechanisms: packed back-to-back=%0d mull=%0d overflow=%0d no-overflow=%0d div0=%0d div1=%0d",
             n_pmull_b2b, n_mull, n_ovf, n_noovf, n_div0, n_div1);
    $display("mechanisms: fast=%0d fast-rem=%0d recip-gen=%0d cam-replace=%0d srt=%0d signed-neg=%0d",
             n_fast, n_fast_rem, n_recip, n_replace, n_srt, n_neg);
    checks++; if (n_pmull_b2b == 0) begin failures++; $display("FAIL no back-to-back packed"); end
    checks++; if (n_ovf == 0 || n_noovf == 0) begin failures++; $display("FAIL overflow cases missing"); end
    checks++; if (n_div0 == 0 || n_div1 == 0) begin failures++; $display("FAIL special divisors missing"); end
    checks++; if (n_fast == 0 || n_fast_rem == 0) begin failures++; $display("FAIL no fast division"); end
    checks++; if (n_recip == 0) begin failures++; $display("FAIL no reciprocal generation"); end
    checks++; if (n_replace == 0) begin failures++; $display("FAIL no CAM replacement"); end
    checks++; if (n_srt == 0) begin failures++; $display("FAIL no SRT division"); end
    checks++; if (n_neg == 0) begin failures++; $display("FAIL no signed negation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
