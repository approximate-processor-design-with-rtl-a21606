// Self-checking test of the approximate multiply unit: XMUL is exact at level
// 000 for operands in the signed 16-bit range (including negative rs2), other
// approximate codes give 0, and raising the level changes some products.
module tb_xmuldiv;
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
  logic [31:0] a, b, r;
  logic [2:0]  f3, lm;
  logic [6:0]  f7;
  int          diffs;
  xmuldiv dut (.op_1(a), .op_2(b), .funct3(f3), .funct7(f7), .approx_level_mul(lm), .result(r));

  initial begin
    f3 = 0; f7 = 7'b1000001; lm = 0; diffs = 0;
    a = 12; b = 11; #1; check(r == 132, "12*11");
    a = -32'sd5; b = -32'sd7; #1; check(r == 35, "-5*-7");
    a = 40; b = -32'sd3; #1; check(r == -32'sd120, "40*-3");
    f7 = 7'b1000011; #1; check(r == 0, "undefined approximate multiply code");
    f7 = 7'b1000001;
    for (int t = 0; t < 3000; t++) begin
      int sa, sb;
      sa = $urandom_range(0, 65534) - 32767; sb = $urandom_range(0, 65534) - 32767;
      a = 32'(sa); b = 32'(sb); lm = 0; #1;
      check(r == 32'(sa * sb), $sformatf("exact %0d*%0d", sa, sb));
      lm = 3'($urandom); #1;
      check(r == ref_xmul(a, b, lm), $sformatf("approx %0d*%0d lvl %b", sa, sb, lm));
      lm = 3'b111; #1;
      if (r != 32'(sa * sb)) diffs++;
    end
    check(diffs > 0, "level 3 makes some products approximate");
    finish_tb();
  end
endmodule
