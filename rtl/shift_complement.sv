// shift_complement (SAC): partial-product bit select of the Booth multiplier.
// Passes multiplicand bit x (weight m) when SX is set or bit x2 (the bit
// below, weight m-1, i.e. the multiplicand doubled) when S2X is set, and
// inverts the chosen bit when COMP is set so the row becomes a subtraction.
// Combinational; follows the SAC schematic: q = ((x & sx) | (x2 & s2x)) ^ comp.
module shift_complement (
  input  logic x,
  input  logic sx,
  input  logic x2,
  input  logic s2x,
  input  logic comp,
  output logic q
);
  always_comb q = ((x & sx) | (x2 & s2x)) ^ comp;
endmodule
