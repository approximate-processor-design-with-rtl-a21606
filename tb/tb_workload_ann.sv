// Workload test: a small neural-network classifier on the full-size node.
//
// The network has the shape used for 7-attribute data: 7 inputs, one hidden
// layer of 4 units and 2 outputs. 200 test points of 8-bit attributes are
// classified by a program in which every multiply-accumulate uses XMUL and
// XADD; subtraction is not used, as in the original ANN experiments. Weights
// and biases are fixed signed integers. This is an integer stand-in for the
// original's floating-point network with sigmoid units, which the core has
// no instructions for: hidden units use a rectifier and a shift right by 8,
// h = max(0, w.x + b) >>> 8, and the class is the output with the larger
// value. Training is outside the node in the original too; these weights are
// generated by this testbench, not trained.
//
// The program is run at modes 0, 2, 4 and 7. Every stored class is compared
// with a software model of the same program that uses the bit-level
// reference models of XMUL and XADD, and mode 0 must match exact arithmetic.
// The testbench prints how many classes each mode changes relative to exact.
// XMUL, XADD, approximate results that differ from exact ones and taken
// branches are counted; a count of zero is a failure. Watchdog included.
module tb_workload_ann;
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
  initial begin repeat (5000000) @(posedge clk); failures++; $display("watchdog expired"); finish_tb(); end

  logic        rst, start, done, idle, ready, mode_we;
  logic [2:0]  mode, lvl_we;
  logic [1:0]  lvl_add, lvl_sub, lvl_mul;
  logic [2:0]  la, ls, lm;
  logic        iwe, dwe;
  logic [31:0] iaddr, idata, daddr, ddata;
  logic [16:0] ra;
  logic [7:0]  rd;

  approx_iot_node dut (
    .ap_clk(clk), .ap_rst(rst), .ap_start(start), .ap_done(done), .ap_idle(idle), .ap_ready(ready),
    .mode_we(mode_we), .mode(mode), .lvl_we(lvl_we),
    .lvl_add(lvl_add), .lvl_sub(lvl_sub), .lvl_mul(lvl_mul),
    .approx_level_add(la), .approx_level_sub(ls), .approx_level_mul(lm),
    .imem_we(iwe), .imem_waddr(iaddr), .imem_wdata(idata),
    .dmem_we(dwe), .dmem_waddr(daddr), .dmem_wdata(ddata),
    .Data_Result_Address(ra), .Data_Result(rd));

  localparam int P = 200, NIN = 7, NH = 4, NOUT = 2;
  localparam int W1 = 32'hA100, W2 = 32'hA200, HID = 32'hA300, XIN = 32'hB000, OUT = 32'hD000;

  logic [31:0] w1 [NH][NIN + 1];
  logic [31:0] w2 [NOUT][NH + 1];
  logic [31:0] xin [P][NIN];

  // ---------------- program ----------------
  logic [31:0] prog [$];
  function automatic int here(); return prog.size(); endfunction
  function automatic int back(input int label); return 4 * (label - prog.size()); endfunction
  task automatic build();
    int l_pt, l_h, l_k, l_o, l_j;
    prog = {};
    prog.push_back(LUI(10, 32'hB));                 // x10 input pointer
    prog.push_back(LUI(11, 32'hD));                 // x11 output pointer
    prog.push_back(ADDI(12, 0, P));                 // x12 points left
    l_pt = here();
    prog.push_back(LUI(13, 32'hA));  prog.push_back(ADDI(13, 13, W1 - 32'hA000));
    prog.push_back(LUI(14, 32'hA));  prog.push_back(ADDI(14, 14, HID - 32'hA000));
    prog.push_back(ADDI(15, 0, NH));
    l_h = here();
    prog.push_back(ADDI(5, 0, 0));
    prog.push_back(ADDI(16, 10, 0));
    prog.push_back(ADDI(17, 0, NIN));
    l_k = here();
    prog.push_back(LW(6, 13, 0));
    prog.push_back(LW(7, 16, 0));
    prog.push_back(XMUL(8, 6, 7));
    prog.push_back(XADD(5, 5, 8));
    prog.push_back(ADDI(13, 13, 4));
    prog.push_back(ADDI(16, 16, 4));
    prog.push_back(ADDI(17, 17, -1));
    prog.push_back(BNE(17, 0, back(l_k)));
    prog.push_back(LW(6, 13, 0));                   // bias
    prog.push_back(XADD(5, 5, 6));
    prog.push_back(ADDI(13, 13, 4));
    prog.push_back(BGE(5, 0, 8));                   // rectifier
    prog.push_back(ADDI(5, 0, 0));
    prog.push_back(SRAI(5, 5, 8));
    prog.push_back(SW(5, 14, 0));
    prog.push_back(ADDI(14, 14, 4));
    prog.push_back(ADDI(15, 15, -1));
    prog.push_back(BNE(15, 0, back(l_h)));
    // output layer
    prog.push_back(LUI(13, 32'hA));  prog.push_back(ADDI(13, 13, W2 - 32'hA000));
    prog.push_back(ADDI(15, 0, NOUT));
    prog.push_back(LUI(18, 32'h80000));             // best value = most negative
    prog.push_back(ADDI(19, 0, 0));
    prog.push_back(ADDI(20, 0, 0));
    l_o = here();
    prog.push_back(ADDI(5, 0, 0));
    prog.push_back(LUI(14, 32'hA));  prog.push_back(ADDI(14, 14, HID - 32'hA000));
    prog.push_back(ADDI(17, 0, NH));
    l_j = here();
    prog.push_back(LW(6, 13, 0));
    prog.push_back(LW(7, 14, 0));
    prog.push_back(XMUL(8, 6, 7));
    prog.push_back(XADD(5, 5, 8));
    prog.push_back(ADDI(13, 13, 4));
    prog.push_back(ADDI(14, 14, 4));
    prog.push_back(ADDI(17, 17, -1));
    prog.push_back(BNE(17, 0, back(l_j)));
    prog.push_back(LW(6, 13, 0));
    prog.push_back(XADD(5, 5, 6));
    prog.push_back(ADDI(13, 13, 4));
    prog.push_back(BGE(18, 5, 12));                 // keep the first maximum
    prog.push_back(ADDI(18, 5, 0));
    prog.push_back(ADDI(19, 20, 0));
    prog.push_back(ADDI(20, 20, 1));
    prog.push_back(ADDI(15, 15, -1));
    prog.push_back(BNE(15, 0, back(l_o)));
    prog.push_back(SW(19, 11, 0));
    prog.push_back(ADDI(11, 11, 4));
    prog.push_back(ADDI(10, 10, 4 * NIN));
    prog.push_back(ADDI(12, 12, -1));
    prog.push_back(BNE(12, 0, back(l_pt)));
    prog.push_back(EBREAK);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); iwe = 1; iaddr = 32'(4 * i); idata = prog[i];
    end
    @(negedge clk); iwe = 0;
  endtask

  task automatic poke(input int a, input logic [31:0] v);
    @(negedge clk); dwe = 1; daddr = 32'(a); ddata = v;
    @(negedge clk); dwe = 0;
  endtask

  task automatic read_word(input int a, output logic [31:0] v);
    for (int b = 0; b < 4; b++) begin
      ra = 17'(a + b); #1; v[8*b +: 8] = rd;
    end
  endtask

  // ---------------- software model ----------------
  int mclass [P];
  function automatic void model(input bit approx, input logic [2:0] lvla, input logic [2:0] lvlm);
    logic [31:0] acc, h [NH], best;
    int bi;
    for (int p = 0; p < P; p++) begin
      for (int j = 0; j < NH; j++) begin
        acc = 0;
        for (int k = 0; k < NIN; k++)
          acc = approx ? ref_xadd(acc, ref_xmul(w1[j][k], xin[p][k], lvlm), lvla) : acc + w1[j][k] * xin[p][k];
        acc = approx ? ref_xadd(acc, w1[j][NIN], lvla) : acc + w1[j][NIN];
        if ($signed(acc) < 0) acc = 0;
        h[j] = 32'($signed(acc) >>> 8);
      end
      best = 32'h8000_0000; bi = 0;
      for (int m = 0; m < NOUT; m++) begin
        acc = 0;
        for (int j = 0; j < NH; j++)
          acc = approx ? ref_xadd(acc, ref_xmul(w2[m][j], h[j], lvlm), lvla) : acc + w2[m][j] * h[j];
        acc = approx ? ref_xadd(acc, w2[m][NH], lvla) : acc + w2[m][NH];
        if (!($signed(best) >= $signed(acc))) begin best = acc; bi = m; end
      end
      mclass[p] = bi;
    end
  endfunction

  // ---------------- mechanism monitor ----------------
  int n_xmul, n_xadd, n_diff, n_taken;
  logic [31:0] r1, r2;
  always @(posedge clk) if (!rst && dut.u_core.state == 3'd3) begin
    r1 = dut.u_core.rs1_val; r2 = dut.u_core.rs2_val;
    case (dut.u_core.dec.cls)
      CL_XALU: begin n_xadd++; if (dut.u_core.xalu_y != r1 + r2) n_diff++; end
      CL_XMUL: begin n_xmul++; if (dut.u_core.xmul_y != r1 * r2) n_diff++; end
      CL_BRANCH: if (dut.u_core.cu_next_pc != dut.u_core.pc + 4) n_taken++;
      default: ;
    endcase
  end

  task automatic run_mode(input int m, output int changed);
    logic [31:0] v;
    int bad, exact_cls [P];
    model(0, 3'b000, 3'b000);
    exact_cls = mclass;
    @(negedge clk); mode_we = 1; mode = 3'(m);
    @(negedge clk); mode_we = 0;
    model(1, la, lm);
    @(negedge clk); start = 1;
    @(posedge clk);
    while (!done) @(posedge clk);
    @(negedge clk); start = 0;
    @(negedge clk);
    bad = 0; changed = 0;
    for (int p = 0; p < P; p++) begin
      read_word(OUT + 4 * p, v);
      if (v != 32'(mclass[p])) bad++;
      if (v != 32'(exact_cls[p])) changed++;
    end
    check(bad == 0, $sformatf("mode %0d: %0d classes differ from the model", m, bad));
    if (m == 0) check(changed == 0, "mode 0 classifies exactly");
  endtask

  int mode_list [4] = '{0, 2, 4, 7};

  initial begin
    int changed;
    rst = 1; start = 0; mode_we = 0; mode = 0; lvl_we = 0; lvl_add = 0; lvl_sub = 0; lvl_mul = 0;
    iwe = 0; dwe = 0; iaddr = 0; idata = 0; daddr = 0; ddata = 0; ra = 0;
    repeat (3) @(negedge clk); rst = 0;

    // weights: hidden unit j weighs attribute j up and the others slightly
    // down; the output units compare the first two hidden units with the rest
    for (int j = 0; j < NH; j++) begin
      for (int k = 0; k < NIN; k++)
        w1[j][k] = 32'((k == j) ? 60 + $urandom_range(60) : -$signed(32'($urandom_range(20))));
      w1[j][NIN] = 32'(-$signed(32'($urandom_range(2000))));
    end
    for (int m = 0; m < NOUT; m++) begin
      for (int j = 0; j < NH; j++)
        w2[m][j] = 32'(((j < 2) == (m == 0)) ? 20 + $urandom_range(80) : -$signed(32'($urandom_range(40))));
      w2[m][NH] = 32'($urandom_range(100));
    end
    for (int p = 0; p < P; p++)
      for (int k = 0; k < NIN; k++) xin[p][k] = 32'($urandom_range(255));

    for (int j = 0; j < NH; j++)
      for (int k = 0; k <= NIN; k++) poke(W1 + 4 * ((NIN + 1) * j + k), w1[j][k]);
    for (int m = 0; m < NOUT; m++)
      for (int j = 0; j <= NH; j++) poke(W2 + 4 * ((NH + 1) * m + j), w2[m][j]);
    for (int p = 0; p < P; p++)
      for (int k = 0; k < NIN; k++) poke(XIN + 4 * (NIN * p + k), xin[p][k]);
    build();

    foreach (mode_list[i]) begin
      run_mode(mode_list[i], changed);
      $display("mode %0d: %0d of %0d classes differ from exact", mode_list[i], changed, P);
    end
    $display("mechanisms: xmul=%0d xadd=%0d approx_diff=%0d taken_branches=%0d", n_xmul, n_xadd, n_diff, n_taken);
    check(n_xmul > 0, "XMUL executed");
    check(n_xadd > 0, "XADD executed");
    check(n_diff > 0, "approximate results differ from exact ones");
    check(n_taken > 0, "taken branches");
    finish_tb();
  end
endmodule
