// operand_examine: operand inspection and normalisation ("norm & shift,
// leading zeros counter").
//
// Takes the magnitude of the operand (negating it when `is_signed` and the
// operand is negative), counts the leading zeros of that magnitude, reports
// the characteristics the control logic decides with (zero, magnitude one,
// magnitude below 2^13, negative) and shifts the magnitude left by its
// leading-zero count so that bit 63 is set, which the SRT divider needs.
// Purely combinational.
//
// The leading-zero count, the characteristics and the normalising shift
// follow the unit's description. Reading the small-operand limit as 2^13
// (13 bits or fewer) and examining the magnitude rather than the raw operand
// are this design's choices.
module operand_examine
  import mdu_pkg::*;
(
  input  logic [XLEN-1:0] val,
  input  logic            is_signed,
  output opinfo_t         info,
  output logic [XLEN-1:0] mag,    // |val|
  output logic [XLEN-1:0] norm,   // mag << lzc (bit 63 set unless zero)
  output logic [5:0]      shift   // lzc, 0..63 (63 when zero)
);

  logic [6:0] lz;

  always_comb begin
    info.neg = is_signed & val[XLEN-1];
    mag      = info.neg ? (~val + 1'b1) : val;
    lz       = 7'd64;
    for (int i = 0; i < XLEN; i++) begin
      if (mag[i]) lz = 7'(XLEN - 1 - i);
    end
    info.lzc   = lz;
    info.zero  = (mag == '0);
    info.one   = (mag == XLEN'(1));
    info.shortop = (lz >= 7'(XLEN - SMALL_W));
    shift      = info.zero ? 6'd63 : lz[5:0];
    norm       = mag << shift;
  end

endmodule
