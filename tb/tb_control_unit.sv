// Self-checking test of the control unit: operation classes of exact and
// approximate instructions, immediates of every format, branch decisions and
// jump targets.
module tb_control_unit;
  import approx_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog expired"); finish_tb(); end
  logic [31:0] ir, pc, r1, r2, npc;
  dec_t        d;
  logic        ill;
  control_unit dut (.instr(ir), .pc(pc), .rs1_val(r1), .rs2_val(r2), .dec(d), .next_pc(npc), .illegal(ill));
  initial begin
    pc = 32'h100; r1 = 5; r2 = 5;
    ir = ADD(3, 1, 2);  #1; check(d.cls == CL_ALU && d.alu_op == ALU_ADD && d.rd == 3 && d.rs1 == 1 && d.rs2 == 2 && d.wb, "add");
    ir = SUB(3, 1, 2);  #1; check(d.cls == CL_ALU && d.alu_op == ALU_SUB, "sub");
    ir = MUL(3, 1, 2);  #1; check(d.cls == CL_MULDIV, "mul");
    ir = XADD(3, 1, 2); #1; check(d.cls == CL_XALU && d.funct7 == 7'b1000000, "xadd");
    ir = XSUB(3, 1, 2); #1; check(d.cls == CL_XALU && d.funct7 == 7'b1100000, "xsub");
    ir = XMUL(3, 1, 2); #1; check(d.cls == CL_XMUL, "xmul");
    ir = SLL(3, 1, 2);  #1; check(d.cls == CL_SHIFT && d.sh_kind == SH_SLL, "sll");
    ir = SRAI(3, 1, 7); #1; check(d.cls == CL_SHIFT && d.sh_kind == SH_SRA && d.imm[4:0] == 7, "srai");
    ir = ADDI(3, 1, -5); #1; check(d.cls == CL_ALU && d.use_imm && d.imm == -32'sd5, "addi imm");
    ir = LW(4, 2, -8);  #1; check(d.cls == CL_LOAD && d.imm == -32'sd8 && d.wb, "lw");
    ir = SW(4, 2, 2044); #1; check(d.cls == CL_STORE && d.imm == 2044 && !d.wb, "sw imm");
    ir = LUI(5, 32'hABCDE); #1; check(d.cls == CL_LUI && d.imm == 32'hABCDE000, "lui");
    ir = AUIPC(5, 1);   #1; check(d.cls == CL_AUIPC && d.imm == 32'h1000, "auipc");
    ir = EBREAK;        #1; check(d.cls == CL_EBREAK && !ill, "ebreak");
    ir = 32'h0000_0073; #1; check(d.cls == CL_NOP && !ill, "ecall is a no-op");
    ir = 32'hFFFF_FFFF; #1; check(ill, "illegal opcode");
    ir = BEQ(1, 2, -16); r1 = 5; r2 = 5; #1; check(d.cls == CL_BRANCH && npc == 32'hF0, "beq taken");
    r2 = 6; #1; check(npc == 32'h104, "beq not taken");
    ir = BNE(1, 2, 64); #1; check(npc == 32'h140, "bne taken");
    ir = BLT(1, 2, 8); r1 = -32'sd1; r2 = 1; #1; check(npc == 32'h108, "blt signed taken");
    ir = BGE(1, 2, 8); #1; check(npc == 32'h104, "bge not taken");
    ir = b_type(8, 2, 1, 3'b110); #1; check(npc == 32'h104, "bltu not taken for ffffffff<1");
    ir = b_type(8, 2, 1, 3'b111); #1; check(npc == 32'h108, "bgeu taken");
    ir = JAL(1, 2048); #1; check(d.cls == CL_JAL && npc == 32'h900 && d.wb, "jal");
    ir = JALR(1, 2, 3); r1 = 32'h2000; #1; check(d.cls == CL_JALR && npc == 32'h2002, "jalr clears bit 0");
    finish_tb();
  end
endmodule
