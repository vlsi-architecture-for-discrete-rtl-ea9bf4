// coef_mux: 8-bit filter-coefficient multiplexer.
// Chooses the high-pass coefficient h while `phase_lo` is 0 (first half of a
// sample cycle) and the low-pass coefficient l while it is 1, so one
// multiplier serves both filters. In the document the select is the level
// of the clock itself; here it is a phase signal produced from a clock that
// runs at twice the sample rate. Combinational.
module coef_mux
  import dwt_pkg::*;
(
  input  word_t h,
  input  word_t l,
  input  logic  phase_lo,
  output word_t y
);
  always_comb y = phase_lo ? l : h;
endmodule
