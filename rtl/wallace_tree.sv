// Wallace tree that reduces the nine Booth partial products to two rows.
//
// Level 1: three (3:2) CSAs on PP0-2, PP3-5 and PP6-8.
// Level 2: one (3:2) CSA on both outputs of the PP0-2 CSA and the sum of the
//          PP3-5 CSA; one (3:2) CSA on the carry of the PP3-5 CSA and both
//          outputs of the PP6-8 CSA.
// Level 3: one (4:2) CSA on the four level-2 outputs.
// The two rows (sum, carry) go to the final adder. This topology is the
// reference design's; which PP3-5 output goes to which level-2 CSA is this
// design's choice. All rows are W bits. Combinational.
module wallace_tree #(
  parameter int W = 32
) (
  input  logic [W-1:0] pp [9],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] s1a, c1a, s1b, c1b, s1c, c1c;
  logic [W-1:0] s2a, c2a, s2b, c2b;

  csa32 #(.W(W)) u_l1a (.a(pp[0]), .b(pp[1]), .c(pp[2]), .s(s1a), .cy(c1a));
  csa32 #(.W(W)) u_l1b (.a(pp[3]), .b(pp[4]), .c(pp[5]), .s(s1b), .cy(c1b));
  csa32 #(.W(W)) u_l1c (.a(pp[6]), .b(pp[7]), .c(pp[8]), .s(s1c), .cy(c1c));

  csa32 #(.W(W)) u_l2a (.a(s1a), .b(c1a), .c(s1b), .s(s2a), .cy(c2a));
  csa32 #(.W(W)) u_l2b (.a(c1b), .b(s1c), .c(c1c), .s(s2b), .cy(c2b));

  csa42 #(.W(W)) u_l3  (.a(s2a), .b(c2a), .c(s2b), .d(c2b), .s(sum), .cy(carry));
endmodule
