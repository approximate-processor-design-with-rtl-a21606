// Approximate ALU (XALU) of the approximate datapath.
//
// Executes the approximate R-type additions: funct3 = 000 with
// funct7 = 1000000 is XADD, funct7 = 1100000 is XSUB. For XADD the operands
// are first sized: the adder is narrowed to one bit more than the larger
// operand's active width (dynamic_sizing), so leading-zero bits do not
// toggle. XSUB always runs at full width. Both run on approx_add with their
// own 3-bit level. Any other approximate encoding yields 0, leaving room for
// approximate operations that are not defined. Combinational; the core gives
// it the same execute cycle as the exact ALU.
module xalu
  import approx_pkg::*;
(
  input  logic [XLEN-1:0] op_1,
  input  logic [XLEN-1:0] op_2,
  input  logic [2:0]      funct3,
  input  logic [6:0]      funct7,
  input  logic [2:0]      approx_level_add,
  input  logic [2:0]      approx_level_sub,
  output logic [XLEN-1:0] result
);
  logic [XLEN-1:0] add_mask, sum;
  logic            is_add, is_sub;

  dynamic_sizing #(.XLEN(XLEN)) u_size (
    .op1     (op_1),
    .op2     (op_2),
    .add_size(),
    .mul_size(),
    .add_mask(add_mask),
    .mul_mask()
  );

  assign is_add = (funct3 == 3'b000) && (funct7 == F7_XADD);
  assign is_sub = (funct3 == 3'b000) && (funct7 == F7_XSUB);

  approx_add u_add (
    .a               (op_1),
    .b               (op_2),
    .add_sub         (is_sub),
    .approx_level_add(approx_level_add),
    .approx_level_sub(approx_level_sub),
    .size_mask       (is_sub ? '1 : add_mask),
    .result          (sum)
  );

  assign result = (is_add || is_sub) ? sum : '0;
endmodule
