// Multi-cycle RV32IM processor with an exact and an approximate datapath.
//
// Each instruction runs through a small state machine:
//   FETCH  - the instruction memory is read at pc;
//   DECODE - the instruction word is latched;
//   EXEC   - the control unit decodes it and resolves branches/jumps, the
//            register file is read and the selected unit computes: the exact
//            part (ALU, shifter, MULDIV), the approximate part (XALU for
//            XADD/XSUB, XMULDIV for XMUL) or the load/store address; stores
//            write the data memory at the end of this cycle;
//   MEM    - loads only: the addressed word arrives and is extracted;
//   WB     - the result is written to rd and pc moves on.
// So an instruction takes 4 cycles and a load 5. Approximate instructions take
// exactly as long as their exact counterparts. ebreak ends the program.
//
// Control follows the usual HLS block protocol: ap_idle is high while the
// core waits; with ap_start high it sets pc to 0
// and runs; when it reaches ebreak, ap_done and ap_ready pulse for one clock
// and the core goes idle. It starts again only after ap_start has been seen
// low, so a start held high does not rerun the program. ap_rst is active high
// and synchronous.
//
// The three approximation-level buses come from outside the core and may
// change at any time; they act from the next instruction that uses them.
// Program and data are written through the load ports while the core is idle;
// Data_Result reads any data byte back.
//
// From the original design: RV32IM without fence/ecall (here executed as no-ops),
// one state machine per instruction, no branch prediction, the exact and
// approximate parts side by side in the execute stage, approximate
// instructions recognised by bit 31 of an OP-opcode instruction, and the
// ap_* pin names. This design's own choices: the states and cycle counts
// (the original was generated by an HLS tool and its schedule is unknown),
// and the meaning of ap_done. In the original, the HLS function is invoked
// per instruction and ap_done rises after each one; here the core runs the
// whole program on one start and ap_done marks ebreak.
module riscv_core
  import approx_pkg::*;
#(
  parameter int IMEM_BYTES = 40960,
  parameter int DMEM_BYTES = 92160,
  parameter int DMEM_BASE  = 40960
) (
  input  logic        ap_clk,
  input  logic        ap_rst,
  input  logic        ap_start,
  output logic        ap_done,
  output logic        ap_idle,
  output logic        ap_ready,
  input  logic [2:0]  approx_level_add,
  input  logic [2:0]  approx_level_sub,
  input  logic [2:0]  approx_level_mul,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  input  logic        dmem_we,
  input  logic [31:0] dmem_waddr,
  input  logic [31:0] dmem_wdata,
  input  logic [16:0] Data_Result_Address,
  output logic [7:0]  Data_Result
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_EXEC, S_MEM, S_WB, S_DONE} state_e;

  state_e      state;
  logic [31:0] pc, ir, npc, res, maddr;
  logic        armed;
  logic [2:0]  ld_f3;

  // ---------------- memories ----------------
  logic [31:0] imem_rdata, dmem_rdata, dmem_addr, dmem_wdata_c;
  logic [3:0]  dmem_be;

  imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk  (ap_clk),
    .raddr(pc),
    .rdata(imem_rdata),
    .we   (imem_we),
    .waddr(imem_waddr),
    .wdata(imem_wdata)
  );

  dmem #(.BYTES(DMEM_BYTES), .BASE(DMEM_BASE)) u_dmem (
    .clk      (ap_clk),
    .addr     (dmem_addr),
    .be       (dmem_be),
    .wdata    (dmem_wdata_c),
    .rdata    (dmem_rdata),
    .ext_we   (dmem_we),
    .ext_addr (dmem_waddr),
    .ext_wdata(dmem_wdata),
    .dbg_addr (Data_Result_Address),
    .dbg_data (Data_Result)
  );

  // ---------------- decode ----------------
  dec_t        dec;
  logic [31:0] rs1_val, rs2_val, cu_next_pc;
  logic        illegal;

  control_unit u_cu (
    .instr  (ir),
    .pc     (pc),
    .rs1_val(rs1_val),
    .rs2_val(rs2_val),
    .dec    (dec),
    .next_pc(cu_next_pc),
    .illegal(illegal)
  );

  logic        rf_we;
  logic [31:0] rf_wd;

  regfile #(.XLEN(XLEN)) u_rf (
    .clk(ap_clk),
    .rst(ap_rst),
    .ra1(dec.rs1),
    .ra2(dec.rs2),
    .rd1(rs1_val),
    .rd2(rs2_val),
    .we (rf_we),
    .wa (dec.rd),
    .wd (rf_wd)
  );

  // ---------------- execute: exact part ----------------
  logic [31:0] opb, alu_y, sh_y, md_y;

  assign opb = dec.use_imm ? dec.imm : rs2_val;

  alu u_alu (.a(rs1_val), .b(opb), .op(dec.alu_op), .y(alu_y));

  shifter u_sh (.a(rs1_val), .shamt(opb[4:0]), .kind(dec.sh_kind), .y(sh_y));

  muldiv u_md (.a(rs1_val), .b(rs2_val), .funct3(dec.funct3), .y(md_y));

  // ---------------- execute: approximate part ----------------
  logic [31:0] xalu_y, xmul_y;

  xalu u_xalu (
    .op_1            (rs1_val),
    .op_2            (rs2_val),
    .funct3          (dec.funct3),
    .funct7          (dec.funct7),
    .approx_level_add(approx_level_add),
    .approx_level_sub(approx_level_sub),
    .result          (xalu_y)
  );

  xmuldiv u_xmul (
    .op_1            (rs1_val),
    .op_2            (rs2_val),
    .funct3          (dec.funct3),
    .funct7          (dec.funct7),
    .approx_level_mul(approx_level_mul),
    .result          (xmul_y)
  );

  // ---------------- load / store ----------------
  logic [31:0] lsu_wdata, lsu_load;
  logic [3:0]  lsu_be;
  logic        lsu_mis;

  load_store_unit u_lsu (
    .addr      (state == S_EXEC ? alu_y : maddr),
    .funct3    (state == S_EXEC ? dec.funct3 : ld_f3),
    .store_data(rs2_val),
    .rdata_word(dmem_rdata),
    .wdata     (lsu_wdata),
    .be        (lsu_be),
    .load_data (lsu_load),
    .misaligned(lsu_mis)
  );

  assign dmem_addr    = (state == S_EXEC) ? alu_y : maddr;
  assign dmem_be      = (state == S_EXEC && dec.cls == CL_STORE) ? lsu_be : 4'b0000;
  assign dmem_wdata_c = lsu_wdata;

  // ---------------- result select ----------------
  logic [31:0] exec_y;

  always_comb begin
    unique case (dec.cls)
      CL_ALU, CL_LUI: exec_y = alu_y;
      CL_SHIFT:       exec_y = sh_y;
      CL_MULDIV:      exec_y = md_y;
      CL_XALU:        exec_y = xalu_y;
      CL_XMUL:        exec_y = xmul_y;
      CL_AUIPC:       exec_y = pc + dec.imm;
      CL_JAL, CL_JALR: exec_y = pc + 32'd4;
      default:        exec_y = '0;
    endcase
  end

  assign rf_we = (state == S_WB) && dec.wb;
  assign rf_wd = res;

  // ---------------- state machine ----------------
  always_ff @(posedge ap_clk) begin
    if (ap_rst) begin
      state <= S_IDLE;
      pc    <= '0;
      ir    <= '0;
      npc   <= '0;
      res   <= '0;
      maddr <= '0;
      ld_f3 <= '0;
      armed <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (!ap_start) armed <= 1'b1;
          if (ap_start && armed) begin
            pc    <= '0;
            armed <= 1'b0;
            state <= S_FETCH;
          end
        end
        S_FETCH:  state <= S_DECODE;
        S_DECODE: begin
          ir    <= imem_rdata;
          state <= S_EXEC;
        end
        S_EXEC: begin
          res   <= exec_y;
          npc   <= cu_next_pc;
          maddr <= alu_y;
          ld_f3 <= dec.funct3;
          if (dec.cls == CL_EBREAK)     state <= S_DONE;
          else if (dec.cls == CL_LOAD)  state <= S_MEM;
          else                          state <= S_WB;
        end
        S_MEM: begin
          res   <= lsu_load;
          state <= S_WB;
        end
        S_WB: begin
          pc    <= npc;
          state <= S_FETCH;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ap_idle  = (state == S_IDLE);
  assign ap_done  = (state == S_DONE);
  assign ap_ready = (state == S_DONE);

  // An instruction the core does not know, or a misaligned access, is
  // executed as described above; flag it in simulation.
  always_ff @(posedge ap_clk)
    if (!ap_rst && state == S_EXEC) begin
      assert (!illegal) else $warning("illegal instruction %h at pc %h", ir, pc);
      assert (!(lsu_mis && (dec.cls == CL_LOAD || dec.cls == CL_STORE)))
        else $warning("misaligned access at pc %h", pc);
    end
endmodule
