// ripple_adder: W-bit carry-ripple adder row of the Booth multiplier array.
// Bit 0 is a half adder (the row has no carry in), bits 1..W-1 are full
// adders; the carry out of the top bit is dropped (modulo 2^W), which is
// exact for the multiplier's 16-bit product. Combinational.
module ripple_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  logic [W-1:0] c;

  half_adder u_ha (.a(a[0]), .b(b[0]), .s(s[0]), .co(c[0]));

  for (genvar i = 1; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i-1]), .s(s[i]), .co(c[i]));
  end
endmodule
