// tb_filter_cell_left: loads a coefficient pair, then checks the product
// with the high-pass coefficient in the first half and the low-pass one in
// the second, for random operands; also checks the load chain output and
// that the coefficients hold while load is low.
`timescale 1ns/1ps
module tb_filter_cell_left;
  import dwt_pkg::*;
  logic clk = 0, load = 0, phase_lo = 0;
  word_t h_in = '0, l_in = '0, h_q, l_q, d = '0;
  sum_t s;
  int checks = 0, failures = 0, hc, lc;
  filter_cell_left dut (.clk, .load, .h_in, .l_in, .h_q, .l_q, .phase_lo, .d, .s);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 20; t++) begin
      hc = $urandom_range(255) - 128; lc = $urandom_range(255) - 128;
      @(negedge clk); load = 1; h_in = word_t'(hc); l_in = word_t'(lc);
      @(negedge clk); load = 0; h_in = word_t'($urandom); l_in = word_t'($urandom);
      checks++; if (int'(h_q) != hc || int'(l_q) != lc) failures++;
      for (int i = 0; i < 20; i++) begin
        d = word_t'($urandom); phase_lo = 1'($urandom); @(negedge clk);
        checks++;
        if (int'(s) != int'(d) * (phase_lo ? lc : hc)) begin
          failures++; $display("FAIL d=%0d ph=%0d s=%0d", d, phase_lo, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
