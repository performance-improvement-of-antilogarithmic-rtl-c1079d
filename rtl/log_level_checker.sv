// log_level_checker - splits the logarithmic input into level and fraction and
// applies the level to the corrected mantissa.
//
// On the way in, A = p + m is split into its integer part p (the level, P_BITS
// bits) and its fraction m (F_W bits). On the way back, the corrected mantissa
// 1+m-c (one integer bit, F_W fraction bits) is multiplied by 2^p with a left
// shift by p, and the integer part of the product is the result B. Fraction
// bits that fall below the binary point are truncated.
//
// The split follows the published formula 2^A = 2^p * 2^m; truncating to an
// O_W-bit integer and the 5.26 input format are this design's choices.
//
// Interface: a_i = {p, m}; level_o = p; frac_o = m; mant_i = corrected
// mantissa; b_o = floor(mant * 2^p). Purely combinational, no clock.
module log_level_checker
  import alog_pkg::*;
#(
  parameter int unsigned P_BITS = P_W,
  parameter int unsigned F_W    = FRAC_W,
  parameter int unsigned O_W    = OUT_W
) (
  input  logic [P_BITS+F_W-1:0] a_i,
  output logic [P_BITS-1:0]     level_o,
  output logic [F_W-1:0]        frac_o,
  input  logic [F_W:0]          mant_i,
  output logic [O_W-1:0]        b_o
);

  localparam int unsigned SH_W = O_W + F_W;

  logic [SH_W-1:0] scaled;

  always_comb begin
    level_o = a_i[P_BITS+F_W-1 -: P_BITS];
    frac_o  = a_i[F_W-1:0];
    scaled  = SH_W'(mant_i) << level_o;
    b_o     = scaled[SH_W-1 -: O_W];
  end

  // Bits below the binary point are dropped (truncation).
  logic unused_frac_bits;
  assign unused_frac_bits = ^scaled[F_W-1:0];

  // The largest level must still leave the leading one inside the result.
  initial assert ((1 << P_BITS) <= O_W)
    else $error("log_level_checker: a %0d-bit level overflows %0d output bits", P_BITS, O_W);

endmodule
