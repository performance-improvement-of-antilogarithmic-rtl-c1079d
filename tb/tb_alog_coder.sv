// tb_alog_coder - checks 1+m-c for corner and random inputs.
//
// The expected values are computed with 64-bit integers: 1+m is
// 2^26 + m, and c = word * 2^-9 is word * 2^17 in units of 2^-26.
module tb_alog_coder;
  timeunit 1ns; timeprecision 1ps;

  logic [25:0] frac;
  logic [5:0]  word;
  logic [26:0] mant;
  int checks = 0, failures = 0;

  alog_coder dut (.frac_i(frac), .word_i(word), .mant_o(mant));

  task automatic check(logic [25:0] f, logic [5:0] w);
    longint e_mit, e_mant;
    frac = f;
    word = w;
    #1;
    e_mit  = (longint'(1) << 26) + longint'(f);
    e_mant = e_mit - (longint'(w) << 17);
    checks++;
    if (longint'(mant) != e_mant) begin
      failures++;
      $display("FAIL m=%h w=%0d mant=%h expected %h", f, w, mant, e_mant);
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
    for (int w = 0; w < 64; w++) begin
      check(26'h3FF_FFFF, 6'(w));
      check(26'h100_0000, 6'(w));
    end
    for (int w = 0; w < 41; w++) check(26'h0, 6'(w));
    for (int i = 0; i < 2000; i++) check(26'($urandom), 6'($urandom_range(0, 40)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
