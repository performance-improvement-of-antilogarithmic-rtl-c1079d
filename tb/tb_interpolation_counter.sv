// tb_interpolation_counter - exhaustive check of the region finder.
//
// Drives all 128 values of the seven fraction MSBs. The expected row is worked
// out from the real value of m: rows are 1/64 wide below 0.25 and 3/64 wide
// above it. The expected region merges rows 13..17. Also checks that all 28
// regions are reached and that region numbers never decrease as m grows.
// Combinational block: each value is held 1 ns before it is checked.
module tb_interpolation_counter;
  timeunit 1ns; timeprecision 1ps;

  logic [6:0] sel;
  logic [4:0] row, region;
  int checks = 0, failures = 0;
  bit seen [28];

  interpolation_counter dut (.sel_i(sel), .row_o(row), .region_o(region));

  function automatic int exp_row(int s);
    real m = s / 128.0;
    if (m < 0.25) return $rtoi(m * 64.0);
    return 16 + $rtoi((m - 0.25) * 64.0 / 3.0);
  endfunction

  function automatic int exp_region(int r);
    if (r < 13) return r;
    if (r < 18) return 13;
    return r - 4;
  endfunction

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev = 0;
    for (int s = 0; s < 128; s++) begin
      sel = 7'(s);
      #1;
      checks += 2;
      if (int'(row) != exp_row(s)) begin
        failures++;
        $display("FAIL sel=%0d row=%0d expected %0d", s, row, exp_row(s));
      end
      if (int'(region) != exp_region(exp_row(s))) begin
        failures++;
        $display("FAIL sel=%0d region=%0d expected %0d", s, region, exp_region(exp_row(s)));
      end
      checks++;
      if (int'(region) < prev || int'(region) > prev + 1) begin
        failures++;
        $display("FAIL sel=%0d region jumps from %0d to %0d", s, prev, region);
      end
      prev = int'(region);
      if (region < 28) seen[region] = 1'b1;
    end
    for (int r = 0; r < 28; r++) begin
      checks++;
      if (!seen[r]) begin
        failures++;
        $display("FAIL region %0d never selected", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
