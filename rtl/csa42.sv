// W-bit (4:2) carry-save adder built from (4:2) compressors.
//
// Each column is two chained full adders: the first adds a, b, c and produces
// a horizontal carry into the next column; the second adds its sum, d and the
// horizontal carry from the column below. The outputs satisfy
// a + b + c + d = s + cy (mod 2^W), with cy already moved up one column. The
// reference design uses an approximate (4:2) compressor from a cited work
// whose logic it does not give; this one is exact. Combinational.
module csa42 #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] s1, cout, cin, carry;

  assign s1    = a ^ b ^ c;
  assign cout  = (a & b) | (a & c) | (b & c);
  assign cin   = {cout[W-2:0], 1'b0};
  assign s     = s1 ^ d ^ cin;
  assign carry = (s1 & d) | (s1 & cin) | (d & cin);
  assign cy    = {carry[W-2:0], 1'b0};
endmodule
