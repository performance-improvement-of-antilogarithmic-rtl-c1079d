// antilog_top - 28-region constant-compensation antilogarithmic converter.
//
// Computes B ~= 2^A for A = p + m with shift-and-add logic only:
//   log_level_checker     splits A into the level p and the fraction m
//   interpolation_counter finds the correction row/region from m's 7 MSBs
//   error_word_generator  gives that region's constant c (sum of 2^-4..2^-9)
//   alog_coder            forms Mitchell's 1+m and subtracts c
//   log_level_checker     scales 1+m-c by 2^p and returns the integer part
// The block structure follows the published block diagram; the buffers drawn
// there are plain connections here, and the whole converter is combinational,
// as in the published pin-to-pin delay figure.
//
// Interface: a_i = {p[4:0], m[25:0]} (m has weight 2^-1 .. 2^-26);
// b_o = floor(2^p * (1+m-c)), 32 bits; mant_o = 1+m-c (1 integer, 26 fraction
// bits); region_o = 0..27.
// No clock: the result is valid one combinational delay after a_i changes.
module antilog_top
  import alog_pkg::*;
(
  input  logic [P_W+FRAC_W-1:0] a_i,
  output logic [OUT_W-1:0]      b_o,
  output logic [FRAC_W:0]       mant_o,
  output logic [REGION_W-1:0]   region_o
);

  logic [P_W-1:0]    level;
  logic [FRAC_W-1:0] frac;
  row_t              row;
  corr_word_t        word;

  log_level_checker u_level (
    .a_i     (a_i),
    .level_o (level),
    .frac_o  (frac),
    .mant_i  (mant_o),
    .b_o     (b_o)
  );

  interpolation_counter u_counter (
    .sel_i    (frac[FRAC_W-1 -: SEL_W]),
    .row_o    (row),
    .region_o (region_o)
  );

  error_word_generator u_error_word (
    .row_i  (row),
    .word_o (word)
  );

  alog_coder u_coder (
    .frac_i     (frac),
    .word_i     (word),
    .mant_o     (mant_o)
  );

  // The level is applied inside u_level; the top needs no copy of it.
  logic unused_level;
  assign unused_level = ^level;

endmodule
