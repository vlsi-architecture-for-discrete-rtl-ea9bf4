// tb_register_bank: shifts random words in with random tick gaps and checks
// that register Rn (r[n-1]) holds the word written n ticks earlier.
`timescale 1ns/1ps
module tb_register_bank;
  import dwt_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  word_t din = '0;
  word_t r [RB_LEN];
  int checks = 0, failures = 0;
  int hist[$];
  register_bank dut (.clk, .rst, .tick, .din, .r);
  always #5 clk = ~clk;
  initial begin : watchdog
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < RB_LEN; k++) hist.push_front(0);
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 150; i++) begin
      din = word_t'($urandom); tick = ($urandom_range(4) != 0);
      #1;
      for (int k = 0; k < RB_LEN; k++) begin
        checks++;
        if (int'(r[k]) != hist[k]) begin failures++; if (failures < 10) $display("FAIL i=%0d R%0d", i, k+1); end
      end
      @(posedge clk);
      if (tick) begin hist.push_front(int'(din)); void'(hist.pop_back()); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
