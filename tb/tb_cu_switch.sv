// tb_cu_switch: drives random words on the three inputs and checks the
// switch output over many eight-slot periods against the schedule table
// (slots 0,2,4,6 input line, 3 and 7 middle tap, 5 bottom tap, 1 zero),
// zero while disabled, and that the slot advances only on tick.
`timescale 1ns/1ps
module tb_cu_switch;
  import dwt_pkg::*;
  logic clk = 0, rst = 1, en = 0, tick = 0;
  word_t top = '0, mid = '0, bot = '0, q;
  src_t src;
  int checks = 0, failures = 0, slot = 0, e;
  // expected source per slot: 0 top, 1 mid, 2 bot, 3 zero
  int table_src[8] = '{0, 3, 0, 1, 0, 2, 0, 1};
  cu_switch dut (.clk, .rst, .en, .tick, .top, .mid, .bot, .q, .src);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      en = (i >= 10);
      tick = 1'($urandom);
      top = word_t'($urandom); mid = word_t'($urandom); bot = word_t'($urandom);
      #1;
      if (!en) e = 0;
      else case (table_src[slot])
        0: e = int'(top); 1: e = int'(mid); 2: e = int'(bot); default: e = 0;
      endcase
      checks++;
      if (int'(q) != e) begin failures++; $display("FAIL i=%0d slot=%0d q=%0d e=%0d", i, slot, q, e); end
      @(posedge clk);
      if (en && tick) slot = (slot + 1) % 8;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
