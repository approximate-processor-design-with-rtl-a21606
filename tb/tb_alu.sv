// Self-checking test of the exact ALU against SystemVerilog arithmetic.
module tb_alu;
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
  logic [31:0] a, b, y;
  alu_op_e     op;
  alu dut (.a(a), .b(b), .op(op), .y(y));
  initial begin
    a = -32'sd1; b = 1; op = ALU_SLT;  #1; check(y == 1, "slt -1<1");
    op = ALU_SLTU; #1; check(y == 0, "sltu ffffffff<1");
    for (int t = 0; t < 2000; t++) begin
      a = $urandom; b = $urandom;
      op = ALU_ADD;   #1; check(y == a + b, "add");
      op = ALU_SUB;   #1; check(y == a - b, "sub");
      op = ALU_SLT;   #1; check(y == 32'($signed(a) < $signed(b)), "slt");
      op = ALU_SLTU;  #1; check(y == 32'(a < b), "sltu");
      op = ALU_XOR;   #1; check(y == (a ^ b), "xor");
      op = ALU_OR;    #1; check(y == (a | b), "or");
      op = ALU_AND;   #1; check(y == (a & b), "and");
      op = ALU_PASSB; #1; check(y == b, "passb");
    end
    finish_tb();
  end
endmodule
