// Self-checking test of the approximation level control unit: every power
// saving mode gives the tabulated adder/subtractor/multiplier levels, direct
// level writes override single operations, reset returns to exact.
module tb_approx_level_ctrl;
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
  logic       rst, mwe;
  logic [2:0] mode, lwe, la, ls, lm;
  logic [1:0] va, vs, vm;
  approx_level_ctrl dut (.clk(clk), .rst(rst), .mode_we(mwe), .mode(mode), .lvl_we(lwe),
    .lvl_add(va), .lvl_sub(vs), .lvl_mul(vm), .approx_level_add(la), .approx_level_sub(ls), .approx_level_mul(lm));
  int tab_a [8] = '{0, 1, 1, 2, 2, 3, 3, 3};
  int tab_s [8] = '{0, 1, 1, 2, 2, 2, 3, 3};
  int tab_m [8] = '{0, 0, 1, 1, 2, 2, 2, 3};
  logic [2:0] code [4] = '{3'b000, 3'b001, 3'b011, 3'b111};
  initial begin
    rst = 1; mwe = 0; mode = 0; lwe = 0; va = 0; vs = 0; vm = 0;
    @(negedge clk); rst = 0;
    check(la == 0 && ls == 0 && lm == 0, "reset is exact");
    for (int md = 0; md < 8; md++) begin
      @(negedge clk); mwe = 1; mode = 3'(md);
      @(negedge clk); mwe = 0;
      check(la == code[tab_a[md]] && ls == code[tab_s[md]] && lm == code[tab_m[md]], $sformatf("mode %0d", md));
    end
    @(negedge clk); lwe = 3'b100; vm = 2'd1;
    @(negedge clk); lwe = 0;
    check(lm == 3'b001 && la == 3'b111, "direct multiplier write");
    @(negedge clk); lwe = 3'b011; va = 2'd2; vs = 2'd0; mwe = 1; mode = 3'd7;
    @(negedge clk); lwe = 0; mwe = 0;
    check(la == 3'b011 && ls == 3'b000 && lm == 3'b111, "direct write wins over mode");
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    check(la == 0 && ls == 0 && lm == 0, "reset again");
    finish_tb();
  end
endmodule
