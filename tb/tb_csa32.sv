// Self-checking test of the (3:2) carry-save adder: s + cy = a + b + c
// modulo 2^32, s is the bitwise XOR.
module tb_csa32;
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
  logic [31:0] a, b, c, s, cy;
  csa32 #(.W(32)) dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));
  initial begin
    a = 1; b = 1; c = 1; #1; check(s == 1 && cy == 2, "1+1+1");
    for (int t = 0; t < 4000; t++) begin
      a = $urandom; b = $urandom; c = $urandom; #1;
      check(s + cy == a + b + c, "sum");
      check(s == (a ^ b ^ c) && cy[0] == 1'b0, "row shapes");
    end
    finish_tb();
  end
endmodule
