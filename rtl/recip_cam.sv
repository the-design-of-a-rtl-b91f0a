// recip_cam: content-addressable store of reciprocals of small divisors.
//
// Each of the DEPTH entries holds a valid bit, a 13-bit divisor (the tag) and
// its 80-bit reciprocal. A lookup compares the low 13 bits of the divisor
// with every valid tag in parallel and returns `hit` and the matching
// reciprocal in the same cycle (combinational). Replacement uses a tree
// pseudo-LRU: DEPTH-1 bits, one per node of a binary tree over the entries,
// each pointing to the half that was used less recently. A lookup hit with
// `touch` set, and every write, turn the nodes on the entry's path to point
// away from it. A write to a divisor already present overwrites that entry;
// otherwise it fills the lowest-numbered invalid entry, and when all are
// valid, the entry the tree points to. Writes take effect at the clock edge.
//
// The entry count, the 13-bit tag, the 80-bit reciprocal and pseudo-LRU
// replacement follow the unit's description; the tree form of the
// pseudo-LRU, the invalid-first fill and the reset that clears all entries
// are this design's choices. DEPTH must be a power of two.
module recip_cam
  import mdu_pkg::*;
#(
  parameter int unsigned DEPTH = CAM_DEPTH,
  parameter int unsigned TAG_W = SMALL_W,
  parameter int unsigned DATA_W = RECIP_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TAG_W-1:0]  lk_tag,   // divisor to look up
  input  logic              touch,    // record a hit as a use
  output logic              hit,
  output logic [DATA_W-1:0] lk_data,  // reciprocal of lk_tag when hit
  input  logic              wr_en,
  input  logic [TAG_W-1:0]  wr_tag,
  input  logic [DATA_W-1:0] wr_data
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DEPTH-1:0]  valid;
  logic [TAG_W-1:0]  tag  [DEPTH];
  logic [DATA_W-1:0] data [DEPTH];
  logic [DEPTH-2:0]  plru;

  logic [IW-1:0] hit_idx, wr_hit_idx, victim, free_idx, wr_idx;
  logic          wr_hit, any_free;

  // Associative search for the lookup and for the write.
  always_comb begin
    hit = 1'b0; hit_idx = '0; wr_hit = 1'b0; wr_hit_idx = '0;
    any_free = 1'b0; free_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid[i] && tag[i] == lk_tag) begin hit = 1'b1; hit_idx = IW'(i); end
      if (valid[i] && tag[i] == wr_tag) begin wr_hit = 1'b1; wr_hit_idx = IW'(i); end
      if (!valid[i]) begin any_free = 1'b1; free_idx = IW'(i); end
    end
    lk_data = data[hit_idx];
  end

  // Victim: follow the tree from the root.
  always_comb begin
    int node;
    node = 0;
    for (int l = 0; l < IW; l++) begin
      node = 2 * node + 1 + int'(plru[node]);
    end
    victim = IW'(node - (DEPTH - 1));
  end

  assign wr_idx = wr_hit ? wr_hit_idx : (any_free ? free_idx : victim);

  // Point every node on the path of entry `idx` away from it.
  function automatic logic [DEPTH-2:0] plru_use(input logic [DEPTH-2:0] t, input logic [IW-1:0] idx);
    int node;
    logic [DEPTH-2:0] r;
    r = t;
    node = 0;
    for (int l = IW - 1; l >= 0; l--) begin
      r[node] = ~idx[l];
      node = 2 * node + 1 + int'(idx[l]);
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      plru  <= '0;
    end else if (wr_en) begin
      valid[wr_idx] <= 1'b1;
      plru          <= plru_use(plru, wr_idx);
    end else if (touch && hit) begin
      plru <= plru_use(plru, hit_idx);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag[wr_idx]  <= wr_tag;
      data[wr_idx] <= wr_data;
    end
  end

endmodule
