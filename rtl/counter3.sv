// counter3: 3-bit schedule counter used by every control-unit switch and by
// the master control. Counts 0,1,...,7,0,... on each clock edge while `en`
// is high and is held at 0 by the synchronous reset. The document builds it
// from three toggle flip-flops; an adder-based register is used here.
module counter3 (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic [2:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= 3'd0;
    else if (en) q <= q + 3'd1;
  end
endmodule
