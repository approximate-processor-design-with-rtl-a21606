// Self-checking test of the approximate adder/subtractor wrapper: level
// selection by add_sub, subtraction by negation, exact results at level 000.
module tb_approx_add;
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
  logic [31:0] a, b, m, r;
  logic        sub;
  logic [2:0]  la, ls;
  approx_add dut (.a(a), .b(b), .add_sub(sub), .approx_level_add(la), .approx_level_sub(ls), .size_mask(m), .result(r));

  initial begin
    m = '1;
    a = 3; b = 1; sub = 0; la = 3'b001; ls = 3'b000; #1; check(r == 0, "add uses add level");
    sub = 1; a = 3; b = 32'hFFFF_FFFF; #1; check(r == 4, "3-(-1) exact with sub level 0");
    ls = 3'b001; #1; check(r == 0, "3-(-1) with sub level 1 is 0");
    for (int t = 0; t < 3000; t++) begin
      a = $urandom; b = $urandom; la = 0; ls = 0; m = '1;
      sub = 0; #1; check(r == a + b, "exact add");
      sub = 1; #1; check(r == a - b, "exact sub");
      la = 3'($urandom); ls = 3'($urandom);
      sub = 0; #1; check(r == ref_approx_add(a, b, la, m), "approx add");
      sub = 1; #1; check(r == ref_approx_add(a, -b, ls, m), "approx sub");
    end
    finish_tb();
  end
endmodule
