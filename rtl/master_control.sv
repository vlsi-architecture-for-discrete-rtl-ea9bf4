// master_control (MC): start-up control of the control unit.
//
// After reset the input delay line needs five sample cycles to fill. A 3-bit
// counter counts those cycles (one count per `tick`); when the fifth cycle
// ends, `cu_en` rises, so the control unit is active from the sixth sample
// cycle on, and it stays high until the next reset. The five-cycle fill and
// the sixth-cycle enable follow the document; the counter-compare logic is
// this design's own.
module master_control (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  output logic cu_en
);
  localparam logic [2:0] FILL = 3'd5;
  logic [2:0] cnt;

  counter3 u_cnt (.clk, .rst, .en(tick && !cu_en), .q(cnt));

  always_ff @(posedge clk) begin
    if (rst)                                 cu_en <= 1'b0;
    else if (tick && cnt == FILL - 3'd1)     cu_en <= 1'b1;
  end
endmodule
