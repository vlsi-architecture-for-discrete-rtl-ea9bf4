// full_adder: one-bit full adder cell of the Booth multiplier array.
// sum = a ^ b ^ ci, co = majority(a, b, ci). Purely combinational.
// The document gives this cell's function and a transistor-level schematic;
// the gate structure here is the plain Boolean form.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end
endmodule
