// Exact ALU of the RV32I datapath.
//
// Computes add, sub, signed and unsigned set-less-than, xor, or, and, and a
// pass of the second operand (used for LUI). Register and immediate forms
// share it; the core also uses it for AUIPC. Combinational. Built from the
// RISC-V base specification.
module alu
  import approx_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_op_e         op,
  output logic [XLEN-1:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
