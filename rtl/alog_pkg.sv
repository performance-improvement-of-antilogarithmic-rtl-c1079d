// alog_pkg - shared widths, types and the 28-region correction table of the
// antilogarithmic converter.
//
// The converter computes B = 2^A for A = p + m, where p is the integer part
// (the "level") and m in [0,1) is the fraction. Mitchell's approximation
// replaces 2^m with the straight line 1+m; 1+m always lies on or above 2^m,
// so a small constant c, chosen per region of m, is subtracted:
//   B ~= 2^p * (1 + m - c)
// Each c is a sum of powers of two between 2^-4 and 2^-9, stored here as a
// 6-bit word whose bit 5 has weight 2^-4 and bit 0 weight 2^-9.
//
// The 32 words of CORR_TABLE are the two published 16-row tables laid end to
// end (rows for m < 0.25 first, then rows for m >= 0.25). Five consecutive
// rows carry the same word (binary 011100), so the 32 rows form 28 distinct
// regions, which is where the scheme takes its name.
//
// Region boundaries are this design's reading of the tables: the sixteen
// rows for m < 0.25 are 1/64 wide, the sixteen rows for m >= 0.25 are 3/64
// wide. The boundaries therefore all fall on multiples of 1/64 and are found
// from the top bits of m alone.
package alog_pkg;

  // Word widths. The published design handles data of up to 32 bits and a
  // fraction of 26 bits (m_-1 .. m_-26); a 5-bit level then keeps 2^A within
  // a 32-bit integer.
  parameter int unsigned P_W     = 5;   // integer part (level) p
  parameter int unsigned FRAC_W  = 26;  // fraction m
  parameter int unsigned OUT_W   = 32;  // integer result
  parameter int unsigned SEL_W   = 7;   // fraction MSBs used for the correction
  parameter int unsigned CORR_W  = 6;   // correction word, weights 2^-4 .. 2^-9
  parameter int unsigned CORR_LSB_EXP = 9; // weight of bit 0 is 2^-CORR_LSB_EXP
  parameter int unsigned ROWS    = 32;  // rows of the two tables together
  parameter int unsigned REGIONS = 28;  // distinct correction regions
  parameter int unsigned ROW_W   = $clog2(ROWS);
  parameter int unsigned REGION_W = $clog2(REGIONS);

  typedef logic [CORR_W-1:0] corr_word_t;
  typedef logic [ROW_W-1:0]  row_t;

  // Correction words, index = row (0..15: m < 0.25, 16..31: m >= 0.25).
  parameter corr_word_t CORR_TABLE [ROWS] = '{
    6'b000000, 6'b000010, 6'b000100, 6'b000110,
    6'b001001, 6'b001011, 6'b001101, 6'b001111,
    6'b010001, 6'b010010, 6'b010100, 6'b010110,
    6'b011001, 6'b011100, 6'b011100, 6'b011100,
    6'b011100, 6'b011100, 6'b011111, 6'b100001,
    6'b100100, 6'b101000, 6'b100111, 6'b100011,
    6'b100000, 6'b011100, 6'b011000, 6'b010100,
    6'b010000, 6'b001011, 6'b000110, 6'b000000
  };

  // Region number 0..27 of a row: rows 13..17 share one region.
  function automatic logic [REGION_W-1:0] row_to_region(row_t row);
    if (row <= 5'd13)      return REGION_W'(row);
    else if (row <= 5'd17) return REGION_W'(13);
    else                   return REGION_W'(row - 5'd4);
  endfunction

endpackage
