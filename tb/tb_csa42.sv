// Self-checking test of the (4:2) carry-save adder: s + cy = a + b + c + d
// modulo 2^32.
module tb_csa42;
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
  logic [31:0] a, b, c, d, s, cy;
  csa42 #(.W(32)) dut (.a(a), .b(b), .c(c), .d(d), .s(s), .cy(cy));
  initial begin
    a = 1; b = 1; c = 1; d = 1; #1; check(s + cy == 4, "1+1+1+1");
    for (int t = 0; t < 4000; t++) begin
      a = $urandom; b = $urandom; c = $urandom; d = $urandom; #1;
      check(s + cy == a + b + c + d, "sum");
      check(cy[0] == 1'b0, "carry row shifted");
    end
    finish_tb();
  end
endmodule
