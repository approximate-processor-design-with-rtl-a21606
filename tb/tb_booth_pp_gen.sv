// Self-checking test of the Booth partial-product array: the nine rows must
// add up to y*x mod 2^32 (y signed, x unsigned), the first row must be the
// sign-extended PP0, and row 8 must never carry a negation bit of its own.
module tb_booth_pp_gen;
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
  logic [31:0] rows [9];
  booth_pp_gen #(.N(16), .W(32)) dut (.x(x), .y(y), .rows(rows));

  initial begin
    x = 16'h0001; y = 16'h0003; #1;
    check(rows[0] == 32'h0000_0003, "x=1: PP0 = Y");
    x = 16'h0002; #1;
    // triplet 100 -> -2Y in PP0, triplet 001 -> +Y shifted by 2 in PP1 plus PP0's +1
    check(rows[0] == 32'hFFFF_FFF9 && rows[1] == 32'd13, "x=2: PP0 = ~2Y, PP1 = 4Y + 1");
    x = 16'h0003; y = 16'h0005; #1;
    // triplet 110 -> -Y: PP0 = ~5 (sign extended), +1 lands in row 1 column 0
    check(rows[0] == 32'hFFFF_FFFA && rows[1][0] == 1'b1, "x=3: PP0 = ~Y and negation bit in row 1");
    for (int t = 0; t < 4000; t++) begin
      logic [31:0] sum, expv;
      x = 16'($urandom); y = 16'($urandom); #1;
      sum = '0;
      for (int i = 0; i < 9; i++) sum += rows[i];
      expv = 32'($signed({{16{y[15]}}, y}) * $signed({16'b0, x}));
      check(sum == expv, $sformatf("rows sum x=%h y=%h", x, y));
    end
    finish_tb();
  end
endmodule
