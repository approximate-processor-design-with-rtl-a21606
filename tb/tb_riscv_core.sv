// Self-checking test of the RV32IM core on a directed program.
//
// The program exercises every instruction class: ALU register and immediate
// forms, shifts, the exact MULDIV unit, XADD/XSUB/XMUL, LUI/AUIPC, byte,
// half and word loads and stores, taken and untaken branches, JAL and JALR.
// Each result is stored to data memory and read back through the byte-wide
// result port. It also checks the control protocol (ap_idle, one-cycle
// ap_done/ap_ready, no rerun while ap_start stays high) and the cycle count:
// 4 cycles per instruction, 5 per load, identical for exact and approximate
// operations.
module tb_riscv_core;
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
  initial begin repeat (200000) @(posedge clk); failures++; $display("watchdog expired"); finish_tb(); end

  logic        rst, start, done, idle, ready;
  logic [2:0]  la, ls, lm;
  logic        iwe, dwe;
  logic [31:0] iaddr, idata, daddr, ddata;
  logic [16:0] ra;
  logic [7:0]  rd;

  riscv_core dut (
    .ap_clk(clk), .ap_rst(rst), .ap_start(start), .ap_done(done), .ap_idle(idle), .ap_ready(ready),
    .approx_level_add(la), .approx_level_sub(ls), .approx_level_mul(lm),
    .imem_we(iwe), .imem_waddr(iaddr), .imem_wdata(idata),
    .dmem_we(dwe), .dmem_waddr(daddr), .dmem_wdata(ddata),
    .Data_Result_Address(ra), .Data_Result(rd));

  logic [31:0] prog [$];

  task automatic load_prog();
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); iwe = 1; iaddr = 32'(4 * i); idata = prog[i];
    end
    @(negedge clk); iwe = 0;
  endtask

  task automatic poke(input logic [31:0] a, input logic [31:0] v);
    @(negedge clk); dwe = 1; daddr = a; ddata = v;
    @(negedge clk); dwe = 0;
  endtask

  task automatic read_word(input logic [31:0] a, output logic [31:0] v);
    for (int b = 0; b < 4; b++) begin
      ra = 17'(a + 32'(b)); #1; v[8*b +: 8] = rd;
    end
  endtask

  int cycles, done_pulses;
  task automatic run(output int cyc);
    cyc = 0; done_pulses = 0;
    @(negedge clk); start = 1;
    @(posedge clk);
    while (!done) begin @(posedge clk); cyc++; end
    done_pulses++;
    // hold start high for a while: the core must stay idle
    repeat (20) begin @(posedge clk); if (done) done_pulses++; end
    check(idle, "idle after the program");
    check(done_pulses == 1, "ap_done pulses once with ap_start held high");
    @(negedge clk); start = 0;
    @(negedge clk);
  endtask

  localparam int OUT = 32'hB000;
  int n_instr, n_loads;

  initial begin
    logic [31:0] v;
    int c_exact, c_approx;
    rst = 1; start = 0; la = 0; ls = 0; lm = 0; iwe = 0; dwe = 0; iaddr = 0; idata = 0; daddr = 0; ddata = 0; ra = 0;
    repeat (3) @(negedge clk); rst = 0;
    check(idle && !done && !ready, "idle after reset");

    // ---------------- directed program ----------------
    poke(32'hA000, 32'h8081_F203);
    prog = {};
    prog.push_back(LUI(10, 32'hA));          // x10 = 0xA000 (data)
    prog.push_back(LUI(11, 32'hB));          // x11 = 0xB000 (out)
    prog.push_back(ADDI(1, 0, 100));         // x1 = 100
    prog.push_back(ADDI(2, 0, -7));          // x2 = -7
    prog.push_back(ADD(3, 1, 2));   prog.push_back(SW(3, 11, 0));    // 93
    prog.push_back(SUB(3, 1, 2));   prog.push_back(SW(3, 11, 4));    // 107
    prog.push_back(MUL(3, 1, 2));   prog.push_back(SW(3, 11, 8));    // -700
    prog.push_back(DIV(3, 1, 2));   prog.push_back(SW(3, 11, 12));   // -14
    prog.push_back(SLT(3, 2, 1));   prog.push_back(SW(3, 11, 16));   // 1
    prog.push_back(SLLI(3, 1, 4));  prog.push_back(SW(3, 11, 20));   // 1600
    prog.push_back(SRAI(3, 2, 1));  prog.push_back(SW(3, 11, 24));   // -4
    prog.push_back(XADD(3, 1, 2));  prog.push_back(SW(3, 11, 28));   // 93 at level 0
    prog.push_back(XSUB(3, 1, 2));  prog.push_back(SW(3, 11, 32));   // 107
    prog.push_back(XMUL(3, 1, 2));  prog.push_back(SW(3, 11, 36));   // -700
    prog.push_back(LB(3, 10, 1));   prog.push_back(SW(3, 11, 40));   // 0xFFFFFFF2
    prog.push_back(LHU(3, 10, 2));  prog.push_back(SW(3, 11, 44));   // 0x8081
    prog.push_back(SB(1, 11, 49));                                   // byte 100 at OUT+49
    prog.push_back(AUIPC(3, 1));    prog.push_back(SW(3, 11, 52));   // pc(=4*idx)+0x1000
    // branch not taken then taken over a poison instruction
    prog.push_back(BEQ(1, 2, 8));
    prog.push_back(ADDI(4, 0, 11));
    prog.push_back(BNE(1, 2, 8));
    prog.push_back(ADDI(4, 0, 99));          // skipped
    prog.push_back(SW(4, 11, 56));           // 11
    prog.push_back(JAL(5, 8));               // skip next
    prog.push_back(ADDI(4, 0, 77));          // skipped
    prog.push_back(SW(5, 11, 60));           // return address
    prog.push_back(ADDI(6, 0, 0));
    prog.push_back(AUIPC(7, 0));
    prog.push_back(JALR(8, 7, 12));          // jump to pc_of_auipc + 12
    prog.push_back(ADDI(6, 0, 55));          // skipped
    prog.push_back(SW(6, 11, 64));           // 0
    prog.push_back(LW(9, 11, 0));   prog.push_back(SW(9, 11, 68));   // 93
    prog.push_back(EBREAK);
    load_prog();
    run(c_exact);

    read_word(OUT + 0,  v); check(v == 93, "add");
    read_word(OUT + 4,  v); check(v == 107, "sub");
    read_word(OUT + 8,  v); check(v == -32'sd700, "mul");
    read_word(OUT + 12, v); check(v == -32'sd14, "div");
    read_word(OUT + 16, v); check(v == 1, "slt");
    read_word(OUT + 20, v); check(v == 1600, "slli");
    read_word(OUT + 24, v); check(v == -32'sd4, "srai");
    read_word(OUT + 28, v); check(v == 93, "xadd level 0");
    read_word(OUT + 32, v); check(v == 107, "xsub level 0");
    read_word(OUT + 36, v); check(v == -32'sd700, "xmul level 0");
    read_word(OUT + 40, v); check(v == 32'hFFFF_FFF2, "lb");
    read_word(OUT + 44, v); check(v == 32'h8081, "lhu");
    read_word(OUT + 48, v); check(v[15:8] == 8'd100, "sb");
    read_word(OUT + 52, v); check(v == 32'h1000 + 32'(4 * 29), "auipc");
    read_word(OUT + 56, v); check(v == 11, "branches");
    read_word(OUT + 60, v); check(v == 32'(4 * 37), "jal link");
    read_word(OUT + 64, v); check(v == 0, "jalr target");
    read_word(OUT + 68, v); check(v == 93, "lw");

    // cycle count: every executed instruction 4 cycles, loads 5; count them
    n_instr = prog.size() - 3;               // three skipped instructions
    n_loads = 3;
    check(c_exact == 4 * n_instr + n_loads, $sformatf("cycles %0d expected %0d", c_exact, 4 * n_instr + n_loads));

    // ---------------- exact vs approximate timing ----------------
    prog = {};
    prog.push_back(ADDI(1, 0, 3));
    prog.push_back(ADDI(2, 0, 1));
    for (int i = 0; i < 8; i++) prog.push_back(ADD(3, 1, 2));
    prog.push_back(MUL(3, 1, 2));
    prog.push_back(SUB(3, 1, 2));
    prog.push_back(LUI(11, 32'hB));
    prog.push_back(SW(3, 11, 0));
    prog.push_back(EBREAK);
    load_prog();
    run(c_exact);
    for (int i = 0; i < 8; i++) prog[2 + i] = XADD(3, 1, 2);
    prog[10] = XMUL(3, 1, 2);
    prog[11] = XADD(3, 1, 2);
    la = 3'b001;
    load_prog();
    run(c_approx);
    check(c_exact == c_approx, "approximate instructions take as many cycles as exact ones");
    read_word(OUT, v); check(v == 0, "3 XADD 1 at level 1 gives 0");
    finish_tb();
  end
endmodule
