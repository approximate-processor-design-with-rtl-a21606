// Self-checking test of the radix-4 Booth encoder/selector: for every bit
// triplet the select signals follow the radix-4 recoding (0, +Y, +2Y, -2Y,
// -Y, -0) and PP, read as a signed 17-bit number plus the negative bit,
// equals the recoded multiple of Y.
module tb_booth_encoder;
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
  logic [2:0]  xt;
  logic [15:0] y;
  logic        s, d, n;
  logic [16:0] pp;
  booth_encoder #(.N(16)) dut (.x_trip(xt), .y(y), .single(s), .double(d), .negative(n), .pp(pp));

  // recoded digit of {X(2i+1), X(2i), X(2i-1)}
  function automatic int digit(input logic [2:0] t);
    return -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
  endfunction

  initial begin
    static int exp_s [8] = '{0, 1, 1, 0, 0, 1, 1, 0};
    int exp_d [8] = '{0, 0, 0, 1, 1, 0, 0, 0};
    for (int t = 0; t < 8; t++) begin
      xt = 3'(t); y = 16'h1234; #1;
      check(s == exp_s[t][0] && d == exp_d[t][0] && n == xt[2], $sformatf("selects for %b", xt));
    end
    for (int t = 0; t < 4000; t++) begin
      int val;
      xt = 3'($urandom); y = 16'($urandom); #1;
      val = int'($signed(pp)) + int'(n);
      check(val == digit(xt) * int'($signed(y)), $sformatf("pp for %b y=%h", xt, y));
    end
    finish_tb();
  end
endmodule
