// Self-checking test of the Wallace tree: sum + carry equals the sum of the
// nine input rows modulo 2^32, and the level-1 CSA of PP0-PP2 behaves as its
// own reduction.
module tb_wallace_tree;
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
  logic [31:0] pp [9];
  logic [31:0] s, c;
  wallace_tree #(.W(32)) dut (.pp(pp), .sum(s), .carry(c));
  initial begin
    for (int i = 0; i < 9; i++) pp[i] = 32'(i + 1);
    #1; check(s + c == 45, "1..9");
    for (int t = 0; t < 4000; t++) begin
      logic [31:0] tot;
      tot = '0;
      for (int i = 0; i < 9; i++) begin pp[i] = $urandom; tot += pp[i]; end
      #1; check(s + c == tot, "tree sum");
    end
    finish_tb();
  end
endmodule
