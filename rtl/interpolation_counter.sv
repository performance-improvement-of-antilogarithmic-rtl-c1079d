// interpolation_counter - finds which correction row (and region) the
// fraction m falls in.
//
// It looks only at the SEL_W (7) most significant fraction bits, m_-1 .. m_-7,
// and counts how many row boundaries lie at or below them: the count is the
// row number 0..31. Rows are 1/64 wide below m = 0.25 and 3/64 wide above it,
// so the boundaries sit at k/64 for k = 1..16 and at (16 + 3*(k-16))/64 for
// k = 17..31. The comparison is made on all seven bits (units of 1/128); as
// every boundary is a multiple of 1/64, bit m_-7 decides only ties that cannot
// occur, so the row is effectively set by six bits. The row is also mapped to one of
// the 28 distinct regions (rows 13..17 form one region).
//
// Using seven fraction MSBs follows the published scheme; the row widths and
// the boundary-counting structure are this design's choices.
//
// Interface: sel_i = m_-1..m_-7 (sel_i[SEL_W-1] = m_-1); row_o 0..31;
// region_o 0..27. Purely combinational, no clock.
module interpolation_counter
  import alog_pkg::*;
#(
  parameter int unsigned SEL_BITS = SEL_W
) (
  input  logic [SEL_BITS-1:0] sel_i,
  output row_t                row_o,
  output logic [REGION_W-1:0] region_o
);

  // Fraction in units of 1/128 (top seven bits of m).
  logic [6:0] m128;
  assign m128 = sel_i[SEL_BITS-1 -: 7];

  // Lower edge of row k, in units of 1/128.
  function automatic int unsigned row_edge(int unsigned k);
    return (k <= 16) ? 2 * k : 32 + 6 * (k - 16);
  endfunction

  always_comb begin
    row_o = '0;
    for (int unsigned k = 1; k < ROWS; k++) begin
      if (32'(m128) >= row_edge(k)) row_o = row_o + row_t'(1);
    end
  end

  assign region_o = row_to_region(row_o);

  initial assert (SEL_BITS >= 7)
    else $error("interpolation_counter needs at least seven fraction bits");

endmodule
