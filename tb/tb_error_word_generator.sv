// tb_error_word_generator - checks all 32 correction words.
//
// The reference is the compensation constant of each row written in decimal
// units of 2^-9 (so 28 means 28/512), entered independently of the binary
// table in the design. Also checks that each word is a non-negative constant
// no larger than the largest gap between 1+m and 2^m (about 0.0861).
module tb_error_word_generator;
  timeunit 1ns; timeprecision 1ps;

  logic [4:0] row;
  logic [5:0] word;
  int checks = 0, failures = 0;

  // c * 512 for rows 0..31
  int ref_c [32] = '{ 0,  2,  4,  6,  9, 11, 13, 15, 17, 18, 20, 22, 25, 28, 28, 28,
                     28, 28, 31, 33, 36, 40, 39, 35, 32, 28, 24, 20, 16, 11,  6,  0};

  error_word_generator dut (.row_i(row), .word_o(word));

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) begin
      row = 5'(r);
      #1;
      checks++;
      if (int'(word) != ref_c[r]) begin
        failures++;
        $display("FAIL row=%0d word=%0d expected %0d", r, word, ref_c[r]);
      end
      checks++;
      if (real'(word) / 512.0 > 0.0861) begin
        failures++;
        $display("FAIL row=%0d correction %f exceeds the largest Mitchell gap", r, real'(word) / 512.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
