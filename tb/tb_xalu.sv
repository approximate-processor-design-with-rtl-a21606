// Self-checking test of the approximate ALU: XADD with dynamic sizing, XSUB
// at full width, per-operation levels, and 0 for undefined approximate codes.
module tb_xalu;
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
  logic [2:0]  f3, la, ls;
  logic [6:0]  f7;
  xalu dut (.op_1(a), .op_2(b), .funct3(f3), .funct7(f7), .approx_level_add(la), .approx_level_sub(ls), .result(r));

  initial begin
    f3 = 0; la = 0; ls = 0;
    f7 = 7'b1000000; a = 100; b = 27; #1; check(r == 127, "XADD exact");
    f7 = 7'b1100000; #1; check(r == 73, "XSUB exact");
    f7 = 7'b1000000; a = 3; b = 1; la = 3'b001; #1; check(r == 0, "XADD level 1 3+1");
    f7 = 7'b1010000; #1; check(r == 0, "undefined approximate code gives 0");
    f7 = 7'b1000000; f3 = 3'b001; #1; check(r == 0, "funct3 != 000 gives 0");
    f3 = 0;
    for (int t = 0; t < 3000; t++) begin
      a = $urandom >> $urandom_range(0, 31); b = $urandom >> $urandom_range(0, 31);
      la = 3'($urandom); ls = 3'($urandom);
      f7 = 7'b1000000; #1;
      check(r == ref_approx_add(a, b, la, ref_mask(ref_add_size(a, b))), $sformatf("XADD %h %h %b", a, b, la));
      f7 = 7'b1100000; #1;
      check(r == ref_approx_add(a, -b, ls, '1), $sformatf("XSUB %h %h %b", a, b, ls));
      la = 0; ls = 0; f7 = 7'b1000000; #1; check(r == a + b, "XADD exact sized");
      f7 = 7'b1100000; #1; check(r == a - b, "XSUB exact");
    end
    finish_tb();
  end
endmodule
