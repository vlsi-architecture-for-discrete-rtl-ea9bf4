// register_bank (RB): storage of intermediate low-pass results.
//
// LEN 8-bit registers R1..R26 in series, clocked once per sample cycle
// (`tick`). Every low-pass result of the filter enters R1 and moves one
// register along per cycle, so a value computed n cycles ago sits in Rn.
// With the forward register allocation of the schedule, the second-octave
// operands are read from R1, R3, .., R11 and the third-octave operands from
// R6, R10, .., R26; the output multiplexer reads R4. All registers are
// brought out as r[0..LEN-1] = R1..R26. Structure and length follow the
// document; the synchronous reset to zero is this design's choice.
module register_bank
  import dwt_pkg::*;
#(
  parameter int unsigned LEN = RB_LEN
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  tick,
  input  word_t din,
  output word_t r [LEN]
);
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < LEN; k++) r[k] <= '0;
    end else if (tick) begin
      r[0] <= din;
      for (int k = 1; k < LEN; k++) r[k] <= r[k-1];
    end
  end
endmodule
