// W-bit (3:2) carry-save adder: a row of full adders.
//
// s = a ^ b ^ c, and cy is the majority of a, b and c moved up one column, so
// that a + b + c = s + cy (mod 2^W). The carry out of the top column is
// dropped because the multiplier keeps a W-bit product. The reference design
// uses approximate compressors from a cited work whose logic it does not give;
// this one is exact. Combinational.
module csa32 #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] maj;
  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  assign cy  = {maj[W-2:0], 1'b0};
endmodule
