// Self-checking test of the exact shifter.
module tb_shifter;
  import approx_pkg::*;
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
  logic [31:0] a, y;
  logic [4:0]  sh;
  shift_e      k;
  logic signed [31:0] sa;
  shifter dut (.a(a), .shamt(sh), .kind(k), .y(y));
  initial begin
    a = 32'h8000_0000; sh = 4; k = SH_SRA; #1; check(y == 32'hF800_0000, "sra sign fill");
    k = SH_SRL; #1; check(y == 32'h0800_0000, "srl zero fill");
    for (int t = 0; t < 3000; t++) begin
      a = $urandom; sh = 5'($urandom);
      k = SH_SLL; #1; check(y == (a << sh), "sll");
      k = SH_SRL; #1; check(y == (a >> sh), "srl");
      sa = $signed(a);
      sa = sa >>> sh;
      k = SH_SRA; #1; check(y == sa, $sformatf("sra %h %0d got %h", a, sh, y));
    end
    finish_tb();
  end
endmodule
