// tb_log_level_checker - checks the level/fraction split and the 2^p scaling.
//
// For every level 0..31 and random fractions and mantissas, the expected result
// is floor(mant * 2^p / 2^26), computed with 64-bit integer arithmetic.
module tb_log_level_checker;
  timeunit 1ns; timeprecision 1ps;

  logic [30:0] a;
  logic [4:0]  level;
  logic [25:0] frac;
  logic [26:0] mant;
  logic [31:0] b;
  int checks = 0, failures = 0;

  log_level_checker dut (.a_i(a), .level_o(level), .frac_o(frac), .mant_i(mant), .b_o(b));

  task automatic check(int p, logic [25:0] f, logic [26:0] mt);
    longint e_b;
    a = {5'(p), f};
    mant = mt;
    #1;
    e_b = (longint'(mt) << p) >> 26;
    checks += 3;
    if (int'(level) != p) begin
      failures++;
      $display("FAIL a=%h level=%0d expected %0d", a, level, p);
    end
    if (frac != f) begin
      failures++;
      $display("FAIL a=%h frac=%h expected %h", a, frac, f);
    end
    if (longint'(b) != e_b) begin
      failures++;
      $display("FAIL p=%0d mant=%h b=%h expected %h", p, mt, b, e_b);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 32; p++) begin
      check(p, 26'h0, 27'h400_0000);
      check(p, 26'h3FF_FFFF, 27'h7FF_FFFF);
      for (int i = 0; i < 50; i++)
        check(p, 26'($urandom), {1'b1, 26'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
