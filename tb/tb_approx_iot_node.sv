// End-to-end test of the approximate IoT node at its default sizes
// (40 KB instruction memory, 90 KB data memory at 40960).
//
// Workload: a 1-nearest-neighbour classifier, the KNN kernel of the target
// applications. 200 training records of 4 attributes and a class label are
// loaded into data memory. The program computes the squared Euclidean
// distance of every record to a test point with SUB/MUL/ADD or with the
// approximate XSUB/XMUL/XADD, stores every distance, and keeps the smallest
// distance and its class. It stops with EBREAK.
//
// Runs:
//   1. exact instructions with all levels at maximum: levels must not matter
//   2. approximate instructions at mode 0: results and cycle count identical
//      to run 1
//   3. approximate instructions at modes 2, 5 and 7 (Table 5.2 mapping)
//   4. approximate instructions with the level raised 1 -> 2 -> 3 while the
//      program runs, after one third and two thirds of the records
// Every approximate operation is checked when it executes against the
// bit-level reference model in tb_ref_pkg, and every stored distance and the
// final (class, distance) pair against a software model of the program.
// Mechanism counters (XADD, XSUB, XMUL, approximate results that differ from
// exact ones, dynamically sized additions, mode writes, level changes during
// a run, loads, stores, taken branches, ap_done, no rerun while ap_start is
// held high) are printed at the end; any mechanism that never happened is a
// failure. The watchdog ends a hung simulation with a failure.
module tb_approx_iot_node;
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
  initial begin repeat (3000000) @(posedge clk); failures++; $display("watchdog expired"); finish_tb(); end

  logic        rst, start, done, idle, ready;
  logic        mode_we;
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

  localparam int N      = 200;
  localparam int NATTR  = 4;
  localparam int TEST   = 32'hA000;   // test point, then N
  localparam int RECS   = 32'hA020;   // records: NATTR attributes + class
  localparam int DIST   = 32'hB000;   // one distance per record
  localparam int RES    = 32'hC000;   // class, minimum distance

  logic [31:0] rec [N][NATTR + 1];
  logic [31:0] tpt [NATTR];

  // ---------------- program ----------------
  logic [31:0] prog [$];
  task automatic build(input bit approx);
    prog = {};
    prog.push_back(LUI(10, 32'hA));
    for (int j = 0; j < NATTR; j++) prog.push_back(LW(20 + j, 10, 4 * j));
    prog.push_back(LW(13, 10, 16));
    prog.push_back(ADDI(11, 10, 32));
    prog.push_back(LUI(12, 32'hB));
    prog.push_back(ADDI(14, 0, -1));
    prog.push_back(ADDI(15, 0, 0));
    // loop body, 25 instructions
    prog.push_back(ADDI(5, 0, 0));
    for (int j = 0; j < NATTR; j++) begin
      prog.push_back(LW(6, 11, 4 * j));
      prog.push_back(approx ? XSUB(7, 6, 20 + j) : SUB(7, 6, 20 + j));
      prog.push_back(approx ? XMUL(8, 7, 7)      : MUL(8, 7, 7));
      prog.push_back(approx ? XADD(5, 5, 8)      : ADD(5, 5, 8));
    end
    prog.push_back(SW(5, 12, 0));
    prog.push_back(BGEU(5, 14, 12));
    prog.push_back(ADDI(14, 5, 0));
    prog.push_back(LW(15, 11, 16));
    prog.push_back(ADDI(11, 11, 20));
    prog.push_back(ADDI(12, 12, 4));
    prog.push_back(ADDI(13, 13, -1));
    prog.push_back(BNE(13, 0, -24 * 4));
    prog.push_back(LUI(16, 32'hC));
    prog.push_back(SW(15, 16, 0));
    prog.push_back(SW(14, 16, 4));
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

  // ---------------- software model of the program ----------------
  // per-record levels as level numbers 0..3 for add, sub, mul
  int sch_a [N], sch_s [N], sch_m [N];
  logic [31:0] mdist [N];
  logic [31:0] mclass, mmin;
  function automatic void model(input bit approx);
    logic [31:0] acc, d, p;
    mmin = 32'hFFFF_FFFF; mclass = 0;
    for (int i = 0; i < N; i++) begin
      acc = 0;
      for (int j = 0; j < NATTR; j++) begin
        if (approx) begin
          d   = ref_xsub(rec[i][j], tpt[j], lvl_code(sch_s[i]));
          p   = ref_xmul(d, d, lvl_code(sch_m[i]));
          acc = ref_xadd(acc, p, lvl_code(sch_a[i]));
        end else begin
          d = rec[i][j] - tpt[j]; acc = acc + d * d;
        end
      end
      mdist[i] = acc;
      if (acc < mmin) begin mmin = acc; mclass = rec[i][NATTR]; end
    end
  endfunction

  // ---------------- mechanism monitors ----------------
  int n_xadd, n_xsub, n_xmul, n_diff, n_sized, n_mode, n_switch, n_load, n_store, n_taken, n_done, n_norerun;
  int n_dist_stores;
  bit running;
  logic [31:0] r1, r2, y, e;
  always @(posedge clk) if (!rst && dut.u_core.state == 3'd3) begin   // S_EXEC
    r1 = dut.u_core.rs1_val; r2 = dut.u_core.rs2_val;
    case (dut.u_core.dec.cls)
      CL_XALU: begin
        y = dut.u_core.xalu_y;
        if (dut.u_core.dec.funct7 == F7_XSUB) begin
          n_xsub++;
          e = ref_xsub(r1, r2, ls);
          check(y == e, $sformatf("XSUB %h-%h lvl %b: %h expected %h", r1, r2, ls, y, e));
          if (y != r1 - r2) n_diff++;
        end else begin
          n_xadd++;
          e = ref_xadd(r1, r2, la);
          check(y == e, $sformatf("XADD %h+%h lvl %b: %h expected %h", r1, r2, la, y, e));
          if (y != r1 + r2) n_diff++;
          if (ref_add_size(r1, r2) < 32) n_sized++;
        end
      end
      CL_XMUL: begin
        n_xmul++;
        y = dut.u_core.xmul_y;
        e = ref_xmul(r1, r2, lm);
        check(y == e, $sformatf("XMUL %h*%h lvl %b: %h expected %h", r1, r2, lm, y, e));
        if (y != r1 * r2) n_diff++;
      end
      CL_LOAD:   n_load++;
      CL_STORE: begin
        n_store++;
        if (dut.u_core.alu_y >= DIST && dut.u_core.alu_y < DIST + 4 * N) n_dist_stores++;
      end
      CL_BRANCH: if (dut.u_core.cu_next_pc != dut.u_core.pc + 4) n_taken++;
      default: ;
    endcase
  end

  // raise the level during the run after N/3 and 2N/3 distance stores
  // lvl_we is driven only here; dir_req asks for a direct write of level 1
  bit      sched_on, dir_req;
  int      sched_seen;
  always @(negedge clk) begin
    lvl_we = 3'b000;
    if (dir_req) begin
      dir_req = 0;
      lvl_we  = 3'b111; lvl_add = 2'd1; lvl_sub = 2'd1; lvl_mul = 2'd1;
    end else if (sched_on && n_dist_stores != sched_seen) begin
      sched_seen = n_dist_stores;
      if (sched_seen == N / 3 || sched_seen == 2 * N / 3) begin
        lvl_we  = 3'b111;
        lvl_add = (sched_seen == N / 3) ? 2'd2 : 2'd3;
        lvl_sub = lvl_add; lvl_mul = lvl_add;
        if (running) n_switch++;
      end
    end
  end

  task automatic set_mode(input int m);
    @(negedge clk); mode_we = 1; mode = 3'(m);
    @(negedge clk); mode_we = 0; n_mode++;
  endtask

  int cyc;
  task automatic run(output int c);
    c = 0; n_dist_stores = 0; sched_seen = 0;
    @(negedge clk); start = 1; running = 1;
    @(posedge clk);
    while (!done) begin @(posedge clk); c++; end
    n_done++;
    running = 0;
    // ap_start stays high: the program must not start again
    begin
      bit rerun = 0;
      repeat (30) begin @(posedge clk); if (!idle) rerun = 1; end
      check(!rerun, "no rerun while ap_start is held high");
      if (!rerun) n_norerun++;
    end
    @(negedge clk); start = 0;
    @(negedge clk);
  endtask

  task automatic compare(input string tag);
    logic [31:0] v;
    int bad = 0;
    for (int i = 0; i < N; i++) begin
      read_word(DIST + 4 * i, v);
      if (v !== mdist[i]) begin
        bad++;
        if (bad < 4) $display("%s: record %0d distance %h expected %h", tag, i, v, mdist[i]);
      end
    end
    check(bad == 0, $sformatf("%s: %0d distances wrong", tag, bad));
    read_word(RES, v);     check(v == mclass, $sformatf("%s: class %0d expected %0d", tag, v, mclass));
    read_word(RES + 4, v); check(v == mmin, $sformatf("%s: min %h expected %h", tag, v, mmin));
  endtask

  function automatic void sched_fixed(input int a, input int s, input int m);
    for (int i = 0; i < N; i++) begin sch_a[i] = a; sch_s[i] = s; sch_m[i] = m; end
  endfunction

  // Table 5.2 levels per mode: {add, sub, mul}
  function automatic void mode_levels(input int m, output int a, output int s, output int mu);
    case (m)
      0: begin a = 0; s = 0; mu = 0; end
      1: begin a = 1; s = 1; mu = 0; end
      2: begin a = 1; s = 1; mu = 1; end
      3: begin a = 2; s = 2; mu = 1; end
      4: begin a = 2; s = 2; mu = 2; end
      5: begin a = 3; s = 2; mu = 2; end
      6: begin a = 3; s = 3; mu = 2; end
      default: begin a = 3; s = 3; mu = 3; end
    endcase
  endfunction

  initial begin
    int c_exact, c_x0, a, s, mu, err_sum;
    logic [31:0] exact_d [N], v;
    rst = 1; start = 0; mode_we = 0; mode = 0; dir_req = 0;
    iwe = 0; dwe = 0; iaddr = 0; idata = 0; daddr = 0; ddata = 0; ra = 0; sched_on = 0; running = 0;
    repeat (3) @(negedge clk); rst = 0;
    check(idle && !done, "idle after reset");

    // three clusters of 14-bit attributes
    for (int i = 0; i < N; i++) begin
      int cls;
      cls = $urandom_range(2);
      for (int j = 0; j < NATTR; j++) rec[i][j] = 32'(2000 + 5000 * cls + (j * 700) % 3000 + $urandom_range(2999));
      rec[i][NATTR] = 32'(cls);
    end
    for (int j = 0; j < NATTR; j++) tpt[j] = 32'(7000 + (j * 700) % 3000 + $urandom_range(1000));
    for (int j = 0; j < NATTR; j++) poke(TEST + 4 * j, tpt[j]);
    poke(TEST + 16, N);
    for (int i = 0; i < N; i++)
      for (int j = 0; j <= NATTR; j++) poke(RECS + 20 * i + 4 * j, rec[i][j]);

    // 1. exact program, all levels at maximum
    set_mode(7);
    build(0);
    model(0);
    for (int i = 0; i < N; i++) exact_d[i] = mdist[i];
    run(c_exact);
    compare("exact");
    $display("exact: class %0d, %0d cycles", mclass, c_exact);

    // 2. approximate program at mode 0 equals the exact one
    set_mode(0);
    check(la == 0 && ls == 0 && lm == 0, "mode 0 is exact");
    build(1);
    sched_fixed(0, 0, 0);
    model(1);
    for (int i = 0; i < N; i++) check(mdist[i] == exact_d[i], "model at level 0 is exact");
    run(c_x0);
    compare("mode 0");
    check(c_x0 == c_exact, $sformatf("cycles %0d vs %0d", c_x0, c_exact));

    // 3. fixed modes
    for (int k = 0; k < 3; k++) begin
      int m;
      m = (k == 0) ? 2 : (k == 1) ? 5 : 7;
      set_mode(m);
      mode_levels(m, a, s, mu);
      check(la == lvl_code(a) && ls == lvl_code(s) && lm == lvl_code(mu), $sformatf("mode %0d levels", m));
      sched_fixed(a, s, mu);
      model(1);
      run(cyc);
      compare($sformatf("mode %0d", m));
      err_sum = 0;
      for (int i = 0; i < N; i++) err_sum += (exact_d[i] > mdist[i]) ? 1 : 0;
      $display("mode %0d: class %0d, %0d of %0d distances below exact, %0d cycles", m, mclass, err_sum, N, cyc);
    end

    // 4. level raised 1 -> 2 -> 3 during the run
    dir_req = 1;
    @(negedge clk); @(negedge clk);
    check(la == 3'b001 && ls == 3'b001 && lm == 3'b001, "level 1 via direct writes");
    for (int i = 0; i < N; i++) begin
      sch_a[i] = (i < N / 3) ? 1 : (i < 2 * N / 3) ? 2 : 3;
      sch_s[i] = sch_a[i]; sch_m[i] = sch_a[i];
    end
    model(1);
    sched_on = 1;
    run(cyc);
    sched_on = 0;
    compare("run-time levels");
    check(la == 3'b111 && lm == 3'b111, "level 3 at the end of the run");
    $display("run-time levels: class %0d", mclass);

    $display("mechanisms: xadd=%0d xsub=%0d xmul=%0d approx_diff=%0d sized_add=%0d mode_writes=%0d run_time_switches=%0d",
             n_xadd, n_xsub, n_xmul, n_diff, n_sized, n_mode, n_switch);
    $display("            loads=%0d stores=%0d taken_branches=%0d done=%0d no_rerun=%0d",
             n_load, n_store, n_taken, n_done, n_norerun);
    check(n_xadd > 0, "XADD executed");
    check(n_xsub > 0, "XSUB executed");
    check(n_xmul > 0, "XMUL executed");
    check(n_diff > 0, "approximate results differ from exact ones");
    check(n_sized > 0, "dynamically sized additions");
    check(n_mode > 0, "mode writes");
    check(n_switch == 2, "two level changes during a run");
    check(n_load > 0, "loads");
    check(n_store > 0, "stores");
    check(n_taken > 0, "taken branches");
    check(n_done == 6, "six completed runs");
    check(n_norerun == 6, "no rerun with ap_start held high");
    finish_tb();
  end
endmodule
