// booth_recoder (BRC): radix-4 Booth digit recoder.
// Looks at multiplier bits y[i+1], y[i] and y[i-1] and produces the three
// controls of one partial-product row (Table 3.5 of the bit-pair recoding):
//   sx   - add the multiplicand once      (digit +/-1)
//   s2x  - add the multiplicand doubled   (digit +/-2)
//   comp - negate the row                 (negative digit)
// The document gives the recoding table; the logic equations are this
// design's own. A zero digit gives sx = s2x = comp = 0. Combinational.
module booth_recoder (
  input  logic [2:0] y,      // {y[i+1], y[i], y[i-1]}
  output logic       sx,
  output logic       s2x,
  output logic       comp
);
  always_comb begin
    sx   = y[1] ^ y[0];
    s2x  = (y == 3'b011) || (y == 3'b100);
    comp = y[2] & ~(y[1] & y[0]);
  end
endmodule
