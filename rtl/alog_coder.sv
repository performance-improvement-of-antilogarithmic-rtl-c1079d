// alog_coder - shift-and-add antilog coder with the error-correction adder.
//
// Mitchell's approximation of 2^m is the straight line 1+m, which in fixed
// point is just the fraction with a leading one attached. This block forms
// that mantissa and then subtracts the error word from it:
//   mant = 1 + m - word * 2^-9
// The error word is aligned to the fraction by wiring alone (its LSB lands on
// fraction bit FRAC_W-9), so the only arithmetic is one subtractor. Over the
// whole table 1+m-c stays within [1,2), so the mantissa keeps one integer bit.
//
// The subtraction (c is removed from 1+m, since 1+m >= 2^m) is this design's
// reading of the "+/-" correction in the published formula.
//
// Interface: frac_i = m (FRAC_W bits, weight 2^-1 .. 2^-FRAC_W); word_i the
// error word; mant_o = 1+m-c with one integer and F_W fraction bits. Purely combinational, no clock.
module alog_coder
  import alog_pkg::*;
#(
  parameter int unsigned F_W = FRAC_W
) (
  input  logic [F_W-1:0] frac_i,
  input  corr_word_t     word_i,
  output logic [F_W:0]   mant_o
);

  logic [F_W:0] mitchell;      // 1 + m
  logic [F_W:0] corr_aligned;  // c in units of 2^-F_W

  always_comb begin
    mitchell     = {1'b1, frac_i};
    corr_aligned = (F_W + 1)'(word_i) << (F_W - CORR_LSB_EXP);
    mant_o       = mitchell - corr_aligned;
  end

  initial assert (F_W >= CORR_LSB_EXP)
    else $error("alog_coder needs at least %0d fraction bits", CORR_LSB_EXP);

endmodule
