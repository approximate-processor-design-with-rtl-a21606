// Workload test: k-means clustering on the full-size node.
//
// 200 points of 4 attributes (12-bit values, drawn around four centres) are
// clustered into K = 4 groups in three iterations. Each iteration has two
// parts:
//   * assignment: the squared distance from each point to each centroid is
//     computed with XSUB, XMUL and XADD, and the point goes to the nearest
//     centroid (the first one on a tie);
//   * update: per cluster, exact ADD sums the attributes and counts the
//     points, and DIV gives the new centroid; an empty cluster keeps its
//     centroid.
// As in the original experiments, only the distance loop is approximate. The
// starting centroids are the first four points. Values are kept to 12 bits
// so that every difference fits the 16-bit multiplier's operand range.
//
// The program runs at modes 0, 3 and 7. The final assignments and centroids
// are compared with a software model of the same program, built on the
// bit-level reference models of XSUB, XMUL and XADD. Mode 0 must match exact
// arithmetic. The testbench prints how many assignments each mode changes.
// XSUB, XMUL, XADD, DIV, and approximate results that differ from exact
// ones, are counted, and a count of zero is a failure. Watchdog included.
module tb_workload_km;
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

  localparam int P = 200, NA = 4, K = 4, ITER = 3;
  localparam int CENT = 32'hA100, SUMS = 32'hA200, CNTS = 32'hA240, PTS = 32'hB000, ASG = 32'hC000;

  logic [31:0] pts [P][NA];

  // ---------------- program ----------------
  logic [31:0] prog [$];
  function automatic int here(); return prog.size(); endfunction
  function automatic int back(input int label); return 4 * (label - prog.size()); endfunction
  task automatic build();
    int l_it, l_pt, l_c, l_clr, l_acc, l_up;
    prog = {};
    prog.push_back(ADDI(28, 0, ITER));
    prog.push_back(LUI(30, 32'hA)); prog.push_back(ADDI(30, 30, SUMS - 32'hA000));
    prog.push_back(ADDI(21, 0, K));
    l_it = here();
    // assignment
    prog.push_back(LUI(10, 32'hB));
    prog.push_back(LUI(11, 32'hC));
    prog.push_back(ADDI(12, 0, P));
    l_pt = here();
    prog.push_back(ADDI(18, 0, -1));
    prog.push_back(ADDI(19, 0, 0));
    prog.push_back(ADDI(20, 0, 0));
    prog.push_back(LUI(13, 32'hA)); prog.push_back(ADDI(13, 13, CENT - 32'hA000));
    l_c = here();
    prog.push_back(ADDI(5, 0, 0));
    for (int j = 0; j < NA; j++) begin
      prog.push_back(LW(6, 10, 4 * j));
      prog.push_back(LW(7, 13, 4 * j));
      prog.push_back(XSUB(7, 6, 7));
      prog.push_back(XMUL(8, 7, 7));
      prog.push_back(XADD(5, 5, 8));
    end
    prog.push_back(BGEU(5, 18, 12));
    prog.push_back(ADDI(18, 5, 0));
    prog.push_back(ADDI(19, 20, 0));
    prog.push_back(ADDI(13, 13, 4 * NA));
    prog.push_back(ADDI(20, 20, 1));
    prog.push_back(BNE(20, 21, back(l_c)));
    prog.push_back(SW(19, 11, 0));
    prog.push_back(ADDI(11, 11, 4));
    prog.push_back(ADDI(10, 10, 4 * NA));
    prog.push_back(ADDI(12, 12, -1));
    prog.push_back(BNE(12, 0, back(l_pt)));
    // clear sums and counts
    prog.push_back(ADDI(13, 30, 0));
    prog.push_back(ADDI(14, 0, K * NA + K));
    l_clr = here();
    prog.push_back(SW(0, 13, 0));
    prog.push_back(ADDI(13, 13, 4));
    prog.push_back(ADDI(14, 14, -1));
    prog.push_back(BNE(14, 0, back(l_clr)));
    // accumulate
    prog.push_back(LUI(10, 32'hB));
    prog.push_back(LUI(11, 32'hC));
    prog.push_back(ADDI(12, 0, P));
    l_acc = here();
    prog.push_back(LW(19, 11, 0));
    prog.push_back(SLLI(22, 19, 4));
    prog.push_back(ADD(22, 22, 30));
    for (int j = 0; j < NA; j++) begin
      prog.push_back(LW(6, 10, 4 * j));
      prog.push_back(LW(7, 22, 4 * j));
      prog.push_back(ADD(7, 7, 6));
      prog.push_back(SW(7, 22, 4 * j));
    end
    prog.push_back(SLLI(23, 19, 2));
    prog.push_back(ADD(23, 23, 30));
    prog.push_back(LW(7, 23, CNTS - SUMS));
    prog.push_back(ADDI(7, 7, 1));
    prog.push_back(SW(7, 23, CNTS - SUMS));
    prog.push_back(ADDI(10, 10, 4 * NA));
    prog.push_back(ADDI(11, 11, 4));
    prog.push_back(ADDI(12, 12, -1));
    prog.push_back(BNE(12, 0, back(l_acc)));
    // update
    prog.push_back(LUI(13, 32'hA)); prog.push_back(ADDI(13, 13, CENT - 32'hA000));
    prog.push_back(ADDI(22, 30, 0));
    prog.push_back(ADDI(23, 30, CNTS - SUMS));
    prog.push_back(ADDI(20, 0, K));
    l_up = here();
    prog.push_back(LW(7, 23, 0));
    prog.push_back(BEQ(7, 0, 4 * (1 + 3 * NA)));
    for (int j = 0; j < NA; j++) begin
      prog.push_back(LW(6, 22, 4 * j));
      prog.push_back(DIV(6, 6, 7));
      prog.push_back(SW(6, 13, 4 * j));
    end
    prog.push_back(ADDI(13, 13, 4 * NA));
    prog.push_back(ADDI(22, 22, 4 * NA));
    prog.push_back(ADDI(23, 23, 4));
    prog.push_back(ADDI(20, 20, -1));
    prog.push_back(BNE(20, 0, back(l_up)));
    prog.push_back(ADDI(28, 28, -1));
    prog.push_back(BNE(28, 0, back(l_it)));
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
  int          masg [P];
  logic [31:0] mcent [K][NA];
  function automatic void model(input bit approx, input logic [2:0] l_a, input logic [2:0] l_s, input logic [2:0] l_m);
    logic [31:0] acc, d, best, sums [K][NA];
    int cnt [K];
    for (int c = 0; c < K; c++) for (int j = 0; j < NA; j++) mcent[c][j] = pts[c][j];
    for (int it = 0; it < ITER; it++) begin
      for (int p = 0; p < P; p++) begin
        best = 32'hFFFF_FFFF; masg[p] = 0;
        for (int c = 0; c < K; c++) begin
          acc = 0;
          for (int j = 0; j < NA; j++) begin
            if (approx) begin
              d   = ref_xsub(pts[p][j], mcent[c][j], l_s);
              acc = ref_xadd(acc, ref_xmul(d, d, l_m), l_a);
            end else begin
              d = pts[p][j] - mcent[c][j]; acc = acc + d * d;
            end
          end
          if (acc < best) begin best = acc; masg[p] = c; end
        end
      end
      for (int c = 0; c < K; c++) begin cnt[c] = 0; for (int j = 0; j < NA; j++) sums[c][j] = 0; end
      for (int p = 0; p < P; p++) begin
        cnt[masg[p]]++;
        for (int j = 0; j < NA; j++) sums[masg[p]][j] += pts[p][j];
      end
      for (int c = 0; c < K; c++)
        if (cnt[c] != 0) for (int j = 0; j < NA; j++) mcent[c][j] = 32'($signed(sums[c][j]) / cnt[c]);
    end
  endfunction

  // ---------------- mechanism monitor ----------------
  int n_xsub, n_xmul, n_xadd, n_div, n_diff;
  logic [31:0] r1, r2, y;
  always @(posedge clk) if (!rst && dut.u_core.state == 3'd3) begin
    r1 = dut.u_core.rs1_val; r2 = dut.u_core.rs2_val;
    case (dut.u_core.dec.cls)
      CL_XALU: begin
        y = dut.u_core.xalu_y;
        if (dut.u_core.dec.funct7 == F7_XSUB) begin n_xsub++; if (y != r1 - r2) n_diff++; end
        else begin n_xadd++; if (y != r1 + r2) n_diff++; end
      end
      CL_XMUL: begin n_xmul++; if (dut.u_core.xmul_y != r1 * r2) n_diff++; end
      CL_MULDIV: if (dut.u_core.dec.funct3 == 3'b100) n_div++;
      default: ;
    endcase
  end

  int mode_list [3] = '{0, 3, 7};

  initial begin
    int exact_asg [P], bad, changed, cyc;
    logic [31:0] v;
    rst = 1; start = 0; mode_we = 0; mode = 0; lvl_we = 0; lvl_add = 0; lvl_sub = 0; lvl_mul = 0;
    iwe = 0; dwe = 0; iaddr = 0; idata = 0; daddr = 0; ddata = 0; ra = 0;
    repeat (3) @(negedge clk); rst = 0;

    for (int p = 0; p < P; p++) begin
      int c;
      c = p % K;
      for (int j = 0; j < NA; j++)
        pts[p][j] = 32'(400 + 900 * ((c + j) % K) + $urandom_range(700) + (c == 3 && j == 0 ? 200 : 0));
    end
    for (int p = 0; p < P; p++)
      for (int j = 0; j < NA; j++) poke(PTS + 4 * (NA * p + j), pts[p][j]);
    build();
    model(0, 0, 0, 0);
    exact_asg = masg;

    foreach (mode_list[i]) begin
      for (int c = 0; c < K; c++)
        for (int j = 0; j < NA; j++) poke(CENT + 4 * (NA * c + j), pts[c][j]);
      @(negedge clk); mode_we = 1; mode = 3'(mode_list[i]);
      @(negedge clk); mode_we = 0;
      model(1, la, ls, lm);
      @(negedge clk); start = 1;
      @(posedge clk);
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; end
      @(negedge clk); start = 0;
      @(negedge clk);
      bad = 0; changed = 0;
      for (int p = 0; p < P; p++) begin
        read_word(ASG + 4 * p, v);
        if (v != 32'(masg[p])) bad++;
        if (v != 32'(exact_asg[p])) changed++;
      end
      for (int c = 0; c < K; c++)
        for (int j = 0; j < NA; j++) begin
          read_word(CENT + 4 * (NA * c + j), v);
          if (v != mcent[c][j]) bad++;
        end
      check(bad == 0, $sformatf("mode %0d: %0d values differ from the model", mode_list[i], bad));
      if (mode_list[i] == 0) check(changed == 0, "mode 0 clusters exactly");
      $display("mode %0d: %0d of %0d assignments differ from exact, %0d cycles", mode_list[i], changed, P, cyc);
    end
    $display("mechanisms: xsub=%0d xmul=%0d xadd=%0d div=%0d approx_diff=%0d", n_xsub, n_xmul, n_xadd, n_div, n_diff);
    check(n_xsub > 0, "XSUB executed");
    check(n_xmul > 0, "XMUL executed");
    check(n_xadd > 0, "XADD executed");
    check(n_div > 0, "DIV executed");
    check(n_diff > 0, "approximate results differ from exact ones");
    finish_tb();
  end
endmodule
