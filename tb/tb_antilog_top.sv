// tb_antilog_top - end-to-end test of the 28-region antilogarithmic converter.
//
// Runs the converter with its default sizes (5-bit level, 26-bit fraction,
// 32-bit result). Two passes:
//   1. Accuracy sweep at level 0: 65536 fractions, one in each 2^-16 step of m
//      with random low bits. The corrected mantissa must lie within
//      -0.25 % .. +1.6 % of the exact 2^m (the bounds this region map gives),
//      and Mitchell's 1+m within 0 .. +6.15 %. Largest errors are printed.
//   2. Level sweep: for each level p = 0..31, 1000 random fractions; b_o must
//      equal floor(2^p * (1+m-c)) exactly.
// The expected values come from a model of the scheme written here: the region
// is found from the real value of m and c from a decimal copy of the table.
// Mechanisms counted (a failure if never seen): each of the 28 regions, each
// level shift 0..31, the zero-correction rows at both ends of m, and the
// merged region that spans the two tables.
module tb_antilog_top;
  timeunit 1ns; timeprecision 1ps;

  logic [30:0] a;
  logic [31:0] b;
  logic [26:0] mant;
  logic [4:0]  region;
  int checks = 0, failures = 0;

  int ref_c [32] = '{ 0,  2,  4,  6,  9, 11, 13, 15, 17, 18, 20, 22, 25, 28, 28, 28,
                     28, 28, 31, 33, 36, 40, 39, 35, 32, 28, 24, 20, 16, 11,  6,  0};

  int region_hits [28];
  int level_hits  [32];
  int zero_low_hits = 0, zero_high_hits = 0, merged_hits = 0;
  real max_pos = -100.0, max_neg = 100.0, mit_max = 0.0;

  antilog_top dut (.a_i(a), .b_o(b), .mant_o(mant), .region_o(region));

  function automatic int ref_row(logic [25:0] f);
    real m = real'(f) / 67108864.0;
    if (m < 0.25) return $rtoi(m * 64.0);
    return 16 + $rtoi((m - 0.25) * 64.0 / 3.0);
  endfunction

  function automatic int ref_region(int r);
    if (r < 13) return r;
    if (r < 18) return 13;
    return r - 4;
  endfunction

  function automatic longint ref_mant(logic [25:0] f);
    return (longint'(1) << 26) + longint'(f) - (longint'(ref_c[ref_row(f)]) << 17);
  endfunction

  task automatic apply(int p, logic [25:0] f);
    int r;
    a = {5'(p), f};
    #1;
    r = ref_row(f);
    checks += 3;
    if (longint'(mant) != ref_mant(f)) begin
      failures++;
      $display("FAIL m=%h mant=%h expected %h", f, mant, ref_mant(f));
    end
    if (int'(region) != ref_region(r)) begin
      failures++;
      $display("FAIL m=%h region=%0d expected %0d", f, region, ref_region(r));
    end
    if (longint'(b) != ((ref_mant(f) << p) >> 26)) begin
      failures++;
      $display("FAIL p=%0d m=%h b=%h expected %h", p, f, b, (ref_mant(f) << p) >> 26);
    end
    if (region < 28) region_hits[region]++;
    level_hits[p]++;
    if (r == 0) zero_low_hits++;
    if (r == 31) zero_high_hits++;
    if (r >= 13 && r <= 17) merged_hits++;
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Pass 1: accuracy at level 0.
    for (int i = 0; i < 65536; i++) begin
      logic [25:0] f;
      real m, exact, e, em;
      f = {16'(i), 10'($urandom)};
      apply(0, f);
      m     = real'(f) / 67108864.0;
      exact = 2.0 ** m;
      e     = (real'(mant) / 67108864.0 - exact) / exact * 100.0;
      em    = (1.0 + m - exact) / exact * 100.0;
      if (e > max_pos) max_pos = e;
      if (e < max_neg) max_neg = e;
      if (em > mit_max) mit_max = em;
      checks += 2;
      if (e > 1.6 || e < -0.25) begin
        failures++;
        $display("FAIL m=%f corrected error %f %%", m, e);
      end
      if (em > 6.15 || em < -1e-9) begin
        failures++;
        $display("FAIL m=%f Mitchell error %f %%", m, em);
      end
    end
    $display("corrected error: max %.4f %%, min %.4f %%; Mitchell max %.4f %%",
             max_pos, max_neg, mit_max);
    checks++;
    if (max_pos - max_neg >= mit_max) begin
      failures++;
      $display("FAIL correction does not narrow the error range");
    end

    // Pass 2: every level.
    for (int p = 0; p < 32; p++) begin
      apply(p, 26'h3FF_FFFF);
      apply(p, 26'h0);
      for (int i = 0; i < 1000; i++) apply(p, 26'($urandom));
    end

    // Mechanism coverage.
    for (int r = 0; r < 28; r++) begin
      checks++;
      if (region_hits[r] == 0) begin
        failures++;
        $display("FAIL region %0d never used", r);
      end
    end
    for (int p = 0; p < 32; p++) begin
      checks++;
      if (level_hits[p] == 0) begin
        failures++;
        $display("FAIL level %0d never used", p);
      end
    end
    checks += 3;
    if (zero_low_hits == 0)  begin failures++; $display("FAIL zero-correction row 0 never used"); end
    if (zero_high_hits == 0) begin failures++; $display("FAIL zero-correction row 31 never used"); end
    if (merged_hits == 0)    begin failures++; $display("FAIL merged region never used"); end
    $display("coverage: zero rows %0d/%0d, merged region %0d, levels 32, regions 28",
             zero_low_hits, zero_high_hits, merged_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
