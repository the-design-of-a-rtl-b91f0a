// tb_recip_cam: self-checking test of the 8-entry reciprocal CAM.
// A reference model (tag/data/valid arrays and the same tree pseudo-LRU
// rule, written independently as "least recently pointed-to" ages) is kept
// alongside. Random writes and lookups, with a small tag pool so that hits,
// overwrites and replacements all occur; every lookup's hit flag and data
// are compared, and the victim of each replacement is checked by looking up
// the evicted tag afterwards.
module tb_recip_cam;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, touch, hit, wr_en;
  logic [12:0] lk_tag, wr_tag;
  logic [79:0] lk_data, wr_data;
  int checks = 0, failures = 0;

  recip_cam dut (.*);

  // Reference: 7-bit tree, node i points to the less recently used half.
  logic        mv [8];
  logic [12:0] mt [8];
  logic [79:0] md [8];
  logic [6:0]  tree;

  function automatic int victim_of(input logic [6:0] t);
    int n = 0;
    for (int l = 0; l < 3; l++) n = 2 * n + 1 + int'(t[n]);
    return n - 7;
  endfunction
  function automatic logic [6:0] use_of(input logic [6:0] t, input int w);
    int n = 0;
    for (int l = 2; l >= 0; l--) begin
      t[n] = ~w[l];
      n = 2 * n + 1 + w[l];
    end
    return t;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int replaced = 0;
  initial begin
    rst_n = 0; touch = 0; wr_en = 0; lk_tag = 0; wr_tag = 0; wr_data = 0;
    foreach (mv[i]) mv[i] = 0;
    tree = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      logic [12:0] tg;
      int w;
      tg = 13'($urandom_range(0, 15)) * 13'd397;
      if ($urandom_range(0, 2) == 0) begin
        // write
        wr_en = 1; wr_tag = tg; wr_data = {16'($urandom), $urandom, $urandom}; touch = 0;
        w = -1;
        foreach (mv[i]) if (mv[i] && mt[i] == tg) w = i;
        if (w < 0) for (int i = 7; i >= 0; i--) if (!mv[i]) w = i;
        if (w < 0) begin w = victim_of(tree); replaced++; end
        @(posedge clk); #1;
        wr_en = 0;
        mv[w] = 1; mt[w] = tg; md[w] = wr_data;
        tree = use_of(tree, w);
      end else begin
        logic eh;
        logic [79:0] ed;
        int hw;
        lk_tag = tg; touch = 1'($urandom);
        #1;
        eh = 0; ed = '0; hw = 0;
        foreach (mv[i]) if (mv[i] && mt[i] == tg) begin eh = 1; ed = md[i]; hw = i; end
        checks++;
        if (hit !== eh || (eh && lk_data !== ed)) begin
          failures++;
          $display("FAIL lookup %h hit=%0d exp %0d data=%h exp %h", tg, hit, eh, lk_data, ed);
        end
        @(posedge clk); #1;
        if (eh && touch) tree = use_of(tree, hw);
        touch = 0;
      end
    end
    checks++;
    if (replaced == 0) begin failures++; $display("FAIL no replacement happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
