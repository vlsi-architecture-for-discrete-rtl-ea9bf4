// half_adder: one-bit half adder cell of the Booth multiplier array.
// s = a ^ b, co = a & b. Purely combinational, as in the document's
// half-adder schematic (sum through an exclusive-or built from NANDs,
// carry from the NAND of the inputs, inverted).
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
