// tb_output_select: random sources and values; on hi_tick the register must
// take the filter result tagged b/d/f for the three octave sources and the
// sign-extended R4 word tagged g in the idle slot, hold otherwise, report
// nothing while disabled, and pulse s_valid for one clock per update.
`timescale 1ns/1ps
module tb_output_select;
  import dwt_pkg::*;
  logic clk = 0, rst = 1, hi_tick = 0, en = 0, s_valid;
  src_t src = SRC_GND;
  sum_t y_hi = '0, s;
  word_t r4 = '0;
  out_kind_t kind;
  int checks = 0, failures = 0, es = 0, ek = 0, ev = 0;
  output_select dut (.clk, .rst, .hi_tick, .en, .src, .y_hi, .r4, .s, .kind, .s_valid);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      hi_tick = 1'($urandom); en = ($urandom_range(5) != 0);
      src = src_t'($urandom_range(3)); y_hi = sum_t'($urandom); r4 = word_t'($urandom);
      @(posedge clk);
      ev = (hi_tick && en) ? 1 : 0;
      if (hi_tick) begin
        if (!en) begin es = 0; ek = 0; end
        else case (src)
          SRC_TOP: begin es = int'(y_hi); ek = 1; end
          SRC_MID: begin es = int'(y_hi); ek = 2; end
          SRC_BOT: begin es = int'(y_hi); ek = 3; end
          default: begin es = int'(r4);   ek = 4; end
        endcase
      end
      #1;
      checks += 3;
      if (int'(s) != es) begin failures++; $display("FAIL s i=%0d", i); end
      if (int'(kind) != ek) begin failures++; $display("FAIL kind i=%0d", i); end
      if (int'(s_valid) != ev) begin failures++; $display("FAIL valid i=%0d", i); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
