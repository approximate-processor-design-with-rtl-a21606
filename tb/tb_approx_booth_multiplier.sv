// Self-checking test of the approximate Booth/Wallace multiplier: exact
// products at level 000 (signed y, unsigned x), sized products, and
// approximate products equal to the reference approximate adder applied to
// the tree's two output rows, whose exact sum must itself be the product.
module tb_approx_booth_multiplier;
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
  logic [15:0] x, y;
  logic [2:0]  lvl;
  logic [31:0] m, p;
  approx_booth_multiplier #(.N(16), .W(32)) dut (.x(x), .y(y), .approx_level(lvl), .size_enable(m), .p(p));

  initial begin
    x = 16'd300; y = 16'd200; lvl = 0; m = '1; #1; check(p == 60000, "300*200");
    x = 16'd7; y = 16'hFFFD; #1; check(p == 32'hFFFF_FFEB, "-3*7");
    x = 16'hFFFF; y = 16'h7FFF; #1; check(p == 32'h7FFE_8001, "max");
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] expv, sw, cw;
      x = 16'($urandom); y = 16'($urandom); lvl = 0; m = '1; #1;
      expv = 32'($signed({{16{y[15]}}, y}) * $signed({16'b0, x}));
      check(p == expv, $sformatf("exact %h*%h", y, x));
      sw = dut.sum; cw = dut.carry;
      check(sw + cw == expv, "tree rows add to the product");
      lvl = 3'($urandom); #1;
      check(p == ref_approx_add(sw, cw, lvl, m), $sformatf("approx %h*%h lvl %b", y, x, lvl));
      // sized: unsigned operands of a and b bits, width a+b
      begin
        int na, nb; na = $urandom_range(1, 15); nb = $urandom_range(1, 16);
        y = 16'($urandom) & 16'(ref_mask(na)); x = 16'($urandom) & 16'(ref_mask(nb));
        m = ref_mask(na + nb); lvl = 0; #1;
        check(p == 32'(y) * 32'(x), $sformatf("sized %h*%h", y, x));
      end
    end
    finish_tb();
  end
endmodule
