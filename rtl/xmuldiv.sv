// Approximate multiply unit (XMULDIV) of the approximate datapath.
//
// Executes XMUL (funct7 = 1000001, funct3 = 000): the low 32 bits of
// rs1 * rs2 on the 16 x 16 approximate Booth multiplier. rs1[15:0] is the
// signed multiplicand, rs2[15:0] the unsigned multiplier. Because the Booth
// array takes an unsigned multiplier, a negative rs2 is handled by negating
// both operands first (x*y = (-x)*(-y)); this conditioning is this design's
// own choice. At level 000 the result equals rs1*rs2 whenever both operands
// fit in signed 16 bits (except rs1 = -32768 with rs2 < 0). The product width
// is sized to the sum of the two operands' active widths, taken from the
// register values, so a negative operand keeps the full 32 bits. Other
// approximate encodings (there is no approximate division) yield 0.
// Combinational.
module xmuldiv
  import approx_pkg::*;
(
  input  logic [XLEN-1:0] op_1,
  input  logic [XLEN-1:0] op_2,
  input  logic [2:0]      funct3,
  input  logic [6:0]      funct7,
  input  logic [2:0]      approx_level_mul,
  output logic [XLEN-1:0] result
);
  localparam int N = 16;

  logic [XLEN-1:0] mul_mask, prod, a_c, b_c;
  logic            is_mul, neg;

  dynamic_sizing #(.XLEN(XLEN)) u_size (
    .op1     (op_1),
    .op2     (op_2),
    .add_size(),
    .mul_size(),
    .add_mask(),
    .mul_mask(mul_mask)
  );

  assign neg = op_2[XLEN-1];
  assign a_c = neg ? (~op_1 + 1'b1) : op_1;
  assign b_c = neg ? (~op_2 + 1'b1) : op_2;

  approx_booth_multiplier #(.N(N), .W(XLEN)) u_mul (
    .x           (b_c[N-1:0]),
    .y           (a_c[N-1:0]),
    .approx_level(approx_level_mul),
    .size_enable (mul_mask),
    .p           (prod)
  );

  assign is_mul = (funct3 == 3'b000) && (funct7 == F7_XMUL);
  assign result = is_mul ? prod : '0;
endmodule
