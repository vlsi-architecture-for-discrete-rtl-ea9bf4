// tb_booth_mult: exhaustive check of the 8x8 signed Booth multiplier:
// all 65536 operand pairs against the integer product.
`timescale 1ns/1ps
module tb_booth_mult;
  import dwt_pkg::*;
  word_t x, y;
  sum_t z;
  int checks = 0, failures = 0;
  booth_mult dut (.x, .y, .z);
  initial begin : watchdog
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        x = word_t'(a); y = word_t'(b); #1;
        checks++;
        if (int'(z) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got %0d", a, b, z);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
