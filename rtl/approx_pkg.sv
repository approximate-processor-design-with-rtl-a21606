// Shared types and constants of the approximate RV32IM processor.
//
// Holds the RISC-V opcodes the control unit decodes, the funct7 codes of the
// approximate R-type instructions (the exact ADD/SUB/MUL codes with bit 31 set),
// the 3-bit approximation-level codes, and the decoded-instruction struct that
// the control unit hands to the rest of the core. The level codes follow the
// thermometer encoding 000/001/011/111 for levels 0-3; each bit bypasses one
// group of gray cells in the Sklansky adder tree.
package approx_pkg;

  localparam int XLEN = 32;

  // Major opcodes (RV32I base)
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_FENCE  = 7'b0001111;
  localparam logic [6:0] OPC_SYSTEM = 7'b1110011;

  // funct7 codes of the approximate instructions (funct3 = 000, opcode OP)
  localparam logic [6:0] F7_XADD = 7'b1000000;
  localparam logic [6:0] F7_XSUB = 7'b1100000;
  localparam logic [6:0] F7_XMUL = 7'b1000001;

  // Approximation levels as carried on the 3-bit level buses
  localparam logic [2:0] LVL_EXACT = 3'b000;
  localparam logic [2:0] LVL_1     = 3'b001;
  localparam logic [2:0] LVL_2     = 3'b011;
  localparam logic [2:0] LVL_3     = 3'b111;

  function automatic logic [2:0] level_code(input logic [1:0] lvl);
    case (lvl)
      2'd0:    return LVL_EXACT;
      2'd1:    return LVL_1;
      2'd2:    return LVL_2;
      default: return LVL_3;
    endcase
  endfunction

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef enum logic [1:0] {SH_SLL = 2'd0, SH_SRL = 2'd1, SH_SRA = 2'd2} shift_e;

  // Which execution resource produces the register result.
  //   OP1: exact ALU / shifter / MULDIV, OP2: approximate XALU / XMULDIV,
  //   OP3: load/store. The rest are control-flow and upper-immediate forms.
  typedef enum logic [3:0] {
    CL_ALU, CL_SHIFT, CL_MULDIV, CL_XALU, CL_XMUL, CL_LOAD, CL_STORE,
    CL_BRANCH, CL_JAL, CL_JALR, CL_LUI, CL_AUIPC, CL_EBREAK, CL_NOP
  } op_class_e;

  typedef struct packed {
    op_class_e     cls;
    alu_op_e       alu_op;
    shift_e        sh_kind;
    logic          use_imm;   // second operand is the immediate
    logic [4:0]    rd;
    logic [4:0]    rs1;
    logic [4:0]    rs2;
    logic [2:0]    funct3;
    logic [6:0]    funct7;
    logic [31:0]   imm;
    logic          wb;        // writes rd
  } dec_t;

endpackage
