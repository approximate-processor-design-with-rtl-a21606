// Self-checking test of the sizeable approximate Sklansky adder: exact sums at
// level 000 and full width, masked sums at reduced widths, approximate sums
// against the reference model and hand-worked approximate results.
module tb_approx_sklansky_adder;
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
  logic [31:0] a, b, s, m;
  logic [2:0]  lvl;
  logic        co;
  approx_sklansky_adder #(.WIDTH(32)) dut (.size_enable(m), .approx_level(lvl), .a(a), .b(b), .ci(1'b0), .co(co), .s(s));

  initial begin
    // hand-worked: 3 + 1 = 4 exactly, 0 with the least significant byte approximated
    a = 3; b = 1; m = '1; lvl = 3'b000; #1; check(s == 4, "3+1 exact");
    lvl = 3'b001; #1; check(s == 0, "3+1 level 1 gives 0");
    // 0x00FF + 0x0001: carry chain through bits 0..7 into bit 8
    a = 32'hFF; b = 32'h1; lvl = 3'b000; #1; check(s == 32'h100, "ff+1 exact");
    lvl = 3'b001; #1; check(s != 32'h100, "ff+1 level 1 is inexact");
    // upper bytes alone stay exact at level 1
    // 0x18000 + 0x8000: carry from bit 15 must cross the row-5 gray cell of column 16
    a = 32'h0001_8000; b = 32'h0000_8000; lvl = 3'b001; #1; check(s == 32'h0002_0000, "upper carry exact at level 1");
    lvl = 3'b111; #1; check(s == 32'h0000_0000, "gray cell of col 16 skipped: carry lost at level 3");
    // carry out
    a = 32'hFFFF_FFFF; b = 1; lvl = 0; m = '1; #1; check(co == 1'b1 && s == 0, "carry out");
    for (int t = 0; t < 3000; t++) begin
      a = $urandom; b = $urandom; m = '1; lvl = 3'b000; #1;
      check(s == a + b, $sformatf("exact %h+%h", a, b));
      lvl = 3'($urandom_range(0, 7)); #1;
      check(s == ref_approx_add(a, b, lvl, m), $sformatf("approx %h+%h lvl %b", a, b, lvl));
      // sized: operands of n bits, width n+1
      begin
        int n; n = $urandom_range(1, 31);
        a = $urandom & ref_mask(n); b = $urandom & ref_mask(n); m = ref_mask(n + 1); lvl = 0; #1;
        check(s == a + b, $sformatf("sized %0d bits %h+%h", n, a, b));
        a = 32'hFFFF_FFFF; #1;
        check((s & ~m) == 0, "bits above the size stay 0");
      end
    end
    finish_tb();
  end
endmodule
