// Approximate adder/subtractor (XADD / XSUB).
//
// Wraps the sizeable approximate Sklansky adder. add_sub = 0 adds with the
// level bits approx_level_add; add_sub = 1 subtracts by adding the exact two's
// complement of b, with the level bits approx_level_sub, so one adder serves
// both operations. size_mask comes from the dynamic-sizing logic (all ones for
// subtraction). The handshake pins of the reference HLS wrapper are left out:
// the block is combinational and the core allows it one cycle.
module approx_add
  import approx_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic            add_sub,
  input  logic [2:0]      approx_level_add,
  input  logic [2:0]      approx_level_sub,
  input  logic [XLEN-1:0] size_mask,
  output logic [XLEN-1:0] result
);
  logic [2:0]      approx_level;
  logic [XLEN-1:0] b_p;

  assign approx_level = add_sub ? approx_level_sub : approx_level_add;
  assign b_p          = add_sub ? (~b + 1'b1) : b;

  approx_sklansky_adder #(.WIDTH(XLEN)) u_sklansky (
    .size_enable (size_mask),
    .approx_level(approx_level),
    .a           (a),
    .b           (b_p),
    .ci          (1'b0),
    .co          (),
    .s           (result)
  );
endmodule
