// Self-checking test of the exact RV32M unit, including division by zero and
// signed overflow.
module tb_muldiv;
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
  logic [31:0] a, b, y;
  logic [2:0]  f;
  muldiv dut (.a(a), .b(b), .funct3(f), .y(y));
  initial begin
    a = 7; b = 0; f = 3'b100; #1; check(y == '1, "div by 0");
    f = 3'b110; #1; check(y == 7, "rem by 0");
    a = 32'h8000_0000; b = '1; f = 3'b100; #1; check(y == 32'h8000_0000, "div overflow");
    f = 3'b110; #1; check(y == 0, "rem overflow");
    a = -32'sd7; b = 2; f = 3'b100; #1; check(y == -32'sd3, "div rounds to 0");
    f = 3'b110; #1; check(y == -32'sd1, "rem sign of dividend");
    for (int t = 0; t < 2000; t++) begin
      longint sa, sb; longint unsigned ua, ub;
      a = $urandom; b = $urandom >> $urandom_range(0, 31);
      sa = longint'($signed(a)); sb = longint'($signed(b)); ua = longint'(a); ub = longint'(b);
      f = 3'b000; #1; check(y == 32'(ua * ub), "mul");
      f = 3'b001; #1; check(y == 32'((sa * sb) >>> 32), "mulh");
      f = 3'b010; #1; check(y == 32'((sa * longint'(ub)) >>> 32), "mulhsu");
      f = 3'b011; #1; check(y == 32'((ua * ub) >> 32), "mulhu");
      if (b != 0) begin
        f = 3'b101; #1; check(y == a / b, "divu");
        f = 3'b111; #1; check(y == a % b, "remu");
        f = 3'b100; #1; check(y == 32'(sa / sb), "div");
        f = 3'b110; #1; check(y == 32'(sa % sb), "rem");
      end
    end
    finish_tb();
  end
endmodule
