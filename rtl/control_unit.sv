// Control unit: instruction decoder and branch/jump resolution.
//
// Splits a 32-bit RV32IM instruction into its fields, builds the immediate
// (I, S, B, U or J format) and sorts the instruction into an operation class:
// exact execute (ALU, shifter, MULDIV), approximate execute (XALU, XMULDIV),
// load, store, branch, jump, LUI/AUIPC, ebreak or no-op. An OP-opcode
// instruction with bit 31 set is approximate: funct7 bit 0 then selects
// XMULDIV (XMUL = 1000001) or XALU (XADD = 1000000, XSUB = 1100000).
// Branches and jumps are also resolved here from the register values, so
// next_pc is final in the same cycle; there is no branch prediction. fence
// and ecall are executed as no-ops; other unknown encodings raise illegal and
// are executed as no-ops. Combinational.
module control_unit
  import approx_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [31:0] pc,
  input  logic [31:0] rs1_val,
  input  logic [31:0] rs2_val,
  output dec_t        dec,
  output logic [31:0] next_pc,
  output logic        illegal
);
  logic [6:0]  opcode;
  logic [2:0]  f3;
  logic [6:0]  f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;
  logic        taken;

  assign opcode = instr[6:0];
  assign f3     = instr[14:12];
  assign f7     = instr[31:25];

  assign imm_i = {{20{instr[31]}}, instr[31:20]};
  assign imm_s = {{20{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u = {instr[31:12], 12'b0};
  assign imm_j = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  function automatic alu_op_e arith_op(input logic [2:0] f, input logic sub);
    case (f)
      3'b000:  return sub ? ALU_SUB : ALU_ADD;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    dec         = '0;
    dec.cls     = CL_NOP;
    dec.alu_op  = ALU_ADD;
    dec.sh_kind = SH_SLL;
    dec.rd      = instr[11:7];
    dec.rs1     = instr[19:15];
    dec.rs2     = instr[24:20];
    dec.funct3  = f3;
    dec.funct7  = f7;
    illegal     = 1'b0;

    unique case (opcode)
      OPC_OP: begin
        dec.wb = 1'b1;
        if (f7[6]) begin
          dec.cls = f7[0] ? CL_XMUL : CL_XALU;
        end else if (f7 == 7'b0000001) begin
          dec.cls = CL_MULDIV;
        end else if (f3 == 3'b001 || f3 == 3'b101) begin
          dec.cls     = CL_SHIFT;
          dec.sh_kind = (f3 == 3'b001) ? SH_SLL : (f7[5] ? SH_SRA : SH_SRL);
        end else begin
          dec.cls    = CL_ALU;
          dec.alu_op = arith_op(f3, f7[5]);
        end
      end
      OPC_OPIMM: begin
        dec.wb      = 1'b1;
        dec.use_imm = 1'b1;
        dec.imm     = imm_i;
        if (f3 == 3'b001 || f3 == 3'b101) begin
          dec.cls     = CL_SHIFT;
          dec.sh_kind = (f3 == 3'b001) ? SH_SLL : (f7[5] ? SH_SRA : SH_SRL);
        end else begin
          dec.cls    = CL_ALU;
          dec.alu_op = arith_op(f3, 1'b0);
        end
      end
      OPC_LOAD: begin
        dec.cls = CL_LOAD; dec.wb = 1'b1; dec.use_imm = 1'b1; dec.imm = imm_i;
      end
      OPC_STORE: begin
        dec.cls = CL_STORE; dec.use_imm = 1'b1; dec.imm = imm_s;
      end
      OPC_BRANCH: begin
        dec.cls = CL_BRANCH; dec.imm = imm_b;
      end
      OPC_JAL: begin
        dec.cls = CL_JAL; dec.wb = 1'b1; dec.imm = imm_j;
      end
      OPC_JALR: begin
        dec.cls = CL_JALR; dec.wb = 1'b1; dec.use_imm = 1'b1; dec.imm = imm_i;
      end
      OPC_LUI: begin
        dec.cls = CL_LUI; dec.wb = 1'b1; dec.use_imm = 1'b1; dec.imm = imm_u;
        dec.alu_op = ALU_PASSB;
      end
      OPC_AUIPC: begin
        dec.cls = CL_AUIPC; dec.wb = 1'b1; dec.imm = imm_u;
      end
      OPC_SYSTEM: begin
        if (instr == 32'h0010_0073) dec.cls = CL_EBREAK;
      end
      OPC_FENCE: ;
      default: illegal = 1'b1;
    endcase
  end

  always_comb begin
    unique case (f3)
      3'b000:  taken = (rs1_val == rs2_val);
      3'b001:  taken = (rs1_val != rs2_val);
      3'b100:  taken = ($signed(rs1_val) <  $signed(rs2_val));
      3'b101:  taken = ($signed(rs1_val) >= $signed(rs2_val));
      3'b110:  taken = (rs1_val <  rs2_val);
      3'b111:  taken = (rs1_val >= rs2_val);
      default: taken = 1'b0;
    endcase
  end

  always_comb begin
    unique case (dec.cls)
      CL_BRANCH: next_pc = taken ? pc + imm_b : pc + 32'd4;
      CL_JAL:    next_pc = pc + imm_j;
      CL_JALR:   next_pc = (rs1_val + imm_i) & ~32'd1;
      default:   next_pc = pc + 32'd4;
    endcase
  end
endmodule
