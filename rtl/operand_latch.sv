// operand_latch: source selector and operand latch in front of the
// multiply/divide datapath (one instance per operand, A and B).
//
// A 4:1 multiplexer picks one of four 64-bit source buses. While `load` is
// high the selected source passes straight through to `q` and is captured at
// the clock edge, so a single-cycle operation sees its operand in the issue
// cycle; afterwards `q` holds the captured value for as long as a multi-cycle
// operation needs it. This models the transparent latch of the unit with an
// edge-triggered register and a bypass.
//
// The four sources and the latch follow the unit's organisation; modelling
// the latch as a flip-flop with bypass and its reset value of zero are this
// design's choices.
module operand_latch
  import mdu_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:0][XLEN-1:0] src,   // four source buses
  input  logic [1:0]           sel,   // source select
  input  logic                 load,  // issue cycle: pass and capture
  output logic [XLEN-1:0]      q
);

  logic [XLEN-1:0] held, picked;

  assign picked = src[sel];
  assign q      = load ? picked : held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    held <= '0;
    else if (load) held <= picked;
  end

endmodule
