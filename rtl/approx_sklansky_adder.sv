// Dynamically sizeable approximate Sklansky adder.
//
// s = a + b over the bit positions enabled by size_enable. Three stages:
// a PG generator (P = a^b, G = a&b), the approximate Sklansky carry tree, and
// an XOR stage (s[i] = P[i] ^ carry into bit i). Bits whose size_enable is 0
// have P and G forced to 0 and their sum bit forced to 0, so the unused upper
// part of the adder does not toggle; the result is exact (at level 000) as
// long as the true sum fits in the enabled low bits. co is the carry out of
// the top bit. As in the reference adder, ci enters only the XOR of bit 0 and
// not the carry tree, so it is exact only when ci = 0 (the processor ties it
// to 0). approx_level bypasses gray cells of the tree (see
// sklansky_tree). The gating of P, G and the sum by the size mask is this
// design's reading of the reference adder's size inputs. Combinational.
module approx_sklansky_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] size_enable,
  input  logic [2:0]       approx_level,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic             co,
  output logic [WIDTH-1:0] s
);
  logic [WIDTH-1:0] p, g, c, cin;

  // PG generator, gated by the size mask
  assign p = (a ^ b) & size_enable;
  assign g = (a & b) & size_enable;

  sklansky_tree #(.WIDTH(WIDTH)) u_tree (
    .g0          (g),
    .p0          (p),
    .approx_level(approx_level),
    .c           (c)
  );

  // carry into each bit: ci for bit 0, tree output of the bit below otherwise
  assign cin = {c[WIDTH-2:0], ci};
  assign s   = (p ^ cin) & size_enable;
  assign co  = c[WIDTH-1];
endmodule
