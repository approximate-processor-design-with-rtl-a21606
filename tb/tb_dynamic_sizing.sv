// Self-checking test of the dynamic sizing logic: adder and multiplier widths
// and masks for hand-picked and random operands, including zero and negative
// operands.
module tb_dynamic_sizing;
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
  logic [31:0] a, b, am, mm;
  logic [5:0]  as;
  logic [6:0]  ms;
  dynamic_sizing #(.XLEN(32)) dut (.op1(a), .op2(b), .add_size(as), .mul_size(ms), .add_mask(am), .mul_mask(mm));

  initial begin
    a = 0; b = 0; #1; check(as == 1 && ms == 0 && am == 1 && mm == 0, "zeros");
    a = 200; b = 17; #1; check(as == 9 && ms == 13, "200,17: 8+1 and 8+5");
    a = 5; b = 255; #1; check(as == 9 && am == 32'h1FF && ms == 11, "5,255");
    a = 32'hFFFF_FFF0; b = 3; #1; check(as == 32 && ms == 32 && am == '1 && mm == '1, "negative operand: full width");
    a = 32'h7FFF_FFFF; b = 1; #1; check(as == 32, "31-bit operand capped at 32");
    a = 32'h0000_8000; b = 32'h0000_8000; #1; check(ms == 32 && as == 17, "16+16 bits");
    for (int t = 0; t < 3000; t++) begin
      a = $urandom >> $urandom_range(0, 31); b = $urandom >> $urandom_range(0, 31); #1;
      check(int'(as) == ref_add_size(a, b) && am == ref_mask(ref_add_size(a, b)), $sformatf("add size %h %h", a, b));
      check(int'(ms) == ref_mul_size(a, b) && mm == ref_mask(ref_mul_size(a, b)), $sformatf("mul size %h %h", a, b));
    end
    finish_tb();
  end
endmodule
