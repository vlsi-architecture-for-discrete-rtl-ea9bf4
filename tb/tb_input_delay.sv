// tb_input_delay: feeds random samples with random tick gaps and checks that
// z[0] is the live input and z[k] the sample taken k ticks earlier (zero
// after reset).
`timescale 1ns/1ps
module tb_input_delay;
  import dwt_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  word_t din = '0;
  word_t z [ID_LEN+1];
  int checks = 0, failures = 0;
  int hist[$];
  input_delay dut (.clk, .rst, .tick, .din, .z);
  always #5 clk = ~clk;
  initial begin : watchdog
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < ID_LEN; k++) hist.push_front(0);
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 200; i++) begin
      din = word_t'($urandom); tick = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (z[0] !== din) failures++;
      for (int k = 1; k <= ID_LEN; k++) begin
        checks++;
        if (int'(z[k]) != hist[k-1]) begin failures++; $display("FAIL i=%0d k=%0d", i, k); end
      end
      @(posedge clk);
      if (tick) begin hist.push_front(int'(din)); void'(hist.pop_back()); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
