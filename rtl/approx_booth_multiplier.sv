// Approximate, dynamically sizeable 16 x 16 radix-4 Booth / Wallace multiplier.
//
// p = y * x mod 2^W with y a signed and x an unsigned N-bit number. Booth
// encoding turns the N multiplier bits into N/2+1 partial products
// (booth_pp_gen), a Wallace tree of (3:2) and (4:2) carry-save adders reduces
// them to two rows (wallace_tree), and the approximate Sklansky adder adds the
// two rows. approx_level acts on that final adder exactly as in the
// approximate adder; size_enable masks the product bits above the operands'
// combined width. The partial-product logic and the tree are exact.
// Combinational. The tree is wired for nine partial products, so N is 16.
module approx_booth_multiplier #(
  parameter int N = 16,
  parameter int W = 32
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [2:0]   approx_level,
  input  logic [W-1:0] size_enable,
  output logic [W-1:0] p
);
  logic [W-1:0] rows [N/2+1];
  logic [W-1:0] sum, carry;

  booth_pp_gen #(.N(N), .W(W)) u_pp (
    .x   (x),
    .y   (y),
    .rows(rows)
  );

  wallace_tree #(.W(W)) u_tree (
    .pp   (rows),
    .sum  (sum),
    .carry(carry)
  );

  approx_sklansky_adder #(.WIDTH(W)) u_final (
    .size_enable (size_enable),
    .approx_level(approx_level),
    .a           (sum),
    .b           (carry),
    .ci          (1'b0),
    .co          (),
    .s           (p)
  );
endmodule
