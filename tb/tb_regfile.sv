// Self-checking test of the register file against a shadow array: x0 stays 0,
// writes land on the clock edge, reset clears everything.
module tb_regfile;
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
  logic        rst, we;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] shadow [32];
  regfile #(.XLEN(32)) dut (.clk(clk), .rst(rst), .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2), .we(we), .wa(wa), .wd(wd));
  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    for (int i = 0; i < 32; i++) begin ra1 = 5'(i); #1; check(rd1 == 0, "reset value"); end
    for (int t = 0; t < 3000; t++) begin
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      @(posedge clk); #1;
      if (we && wa != 0) shadow[wa] = wd;
      we = 0;
      ra1 = 5'($urandom); ra2 = 5'($urandom); #1;
      check(rd1 == shadow[ra1] && rd2 == shadow[ra2], "read matches");
    end
    ra1 = 0; wa = 0; wd = 32'hDEAD; we = 1; @(posedge clk); #1; we = 0;
    check(rd1 == 0, "x0 ignores writes");
    finish_tb();
  end
endmodule
