// error_word_generator - turns a correction row into the 6-bit error word.
//
// The error word is the constant c subtracted from Mitchell's 1+m in that row,
// written as a sum of powers of two: bit 5 has weight 2^-4, bit 0 weight 2^-9
// (so c = word * 2^-9). The 32 words are the published correction tables; they
// are decoded by a case statement into plain combinational logic, not stored.
//
// Interface: row_i 0..31 from interpolation_counter; word_o the error word.
// Purely combinational, no clock.
module error_word_generator
  import alog_pkg::*;
(
  input  row_t       row_i,
  output corr_word_t word_o
);

  always_comb begin
    word_o = CORR_TABLE[row_i];
  end

endmodule
