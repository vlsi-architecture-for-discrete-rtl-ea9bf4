// input_delay (ID): input sample window of the first-octave computations.
//
// Five 8-bit registers in series; on each `tick` (one per sample cycle) the
// new sample enters register 1 and every register passes its word to the
// next. z[0] is the live input (z^0) and z[k] its copy k sample cycles old
// (z^-k), so z[0..5] is the window x(n) .. x(n-5) of the filter equations.
// Structure as in the document; the synchronous reset to zero is this
// design's choice, making the history before the first sample read as zeros.
module input_delay
  import dwt_pkg::*;
#(
  parameter int unsigned LEN = ID_LEN
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  tick,
  input  word_t din,
  output word_t z [LEN+1]
);
  word_t r [LEN];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < LEN; k++) r[k] <= '0;
    end else if (tick) begin
      r[0] <= din;
      for (int k = 1; k < LEN; k++) r[k] <= r[k-1];
    end
  end

  always_comb begin
    z[0] = din;
    for (int k = 1; k <= LEN; k++) z[k] = r[k-1];
  end
endmodule
