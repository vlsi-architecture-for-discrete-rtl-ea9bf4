// tb_filter_cell: loads a coefficient pair and checks s = b + coef*d with
// the coefficient chosen by phase_lo, clamped to +/-32767, for random
// operands including large partial sums that force the clamp.
`timescale 1ns/1ps
module tb_filter_cell;
  import dwt_pkg::*;
  logic clk = 0, load = 0, phase_lo = 0;
  word_t h_in = '0, l_in = '0, h_q, l_q, d = '0;
  sum_t b = '0, s;
  int checks = 0, failures = 0, hc, lc, e, nclamp = 0;
  filter_cell dut (.clk, .load, .h_in, .l_in, .h_q, .l_q, .phase_lo, .d, .b, .s);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 20; t++) begin
      hc = $urandom_range(255) - 128; lc = $urandom_range(255) - 128;
      @(negedge clk); load = 1; h_in = word_t'(hc); l_in = word_t'(lc);
      @(negedge clk); load = 0;
      checks++; if (int'(h_q) != hc || int'(l_q) != lc) failures++;
      for (int i = 0; i < 30; i++) begin
        d = word_t'($urandom); phase_lo = 1'($urandom);
        b = (i % 3 == 0) ? sum_t'($urandom_range(65534) - 32767) : sum_t'($urandom_range(2000) - 1000);
        @(negedge clk);
        e = int'(b) + int'(d) * (phase_lo ? lc : hc);
        if (e > 32767) begin e = 32767; nclamp++; end
        if (e < -32767) begin e = -32767; nclamp++; end
        checks++;
        if (int'(s) != e) begin failures++; $display("FAIL d=%0d b=%0d ph=%0d s=%0d e=%0d", d, b, phase_lo, s, e); end
      end
    end
    checks++; if (nclamp == 0) begin failures++; $display("FAIL: clamp never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
