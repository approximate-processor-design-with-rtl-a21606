// Self-checking test of the approximate Sklansky carry tree: exact carries at
// level 000 against a ripple-carry computation, then every level pattern
// against the recursive reference model, plus hand-worked cases.
module tb_sklansky_tree;
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
  logic [31:0] a, b, c;
  logic [2:0]  lvl;
  sklansky_tree #(.WIDTH(32)) dut (.g0(a & b), .p0(a ^ b), .approx_level(lvl), .c(c));

  function automatic logic [31:0] ripple(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] cc; logic cr;
    cr = 1'b0;
    for (int i = 0; i < 32; i++) begin
      cr = (x[i] & y[i]) | ((x[i] ^ y[i]) & cr);
      cc[i] = cr;
    end
    return cc;
  endfunction

  // carries implied by the reference adder (its sum reveals c[i-1] = s[i]^p[i])
  function automatic logic [30:0] ref_carry(input logic [31:0] x, input logic [31:0] y, input logic [2:0] l);
    logic [31:0] s;
    s = ref_approx_add(x, y, l, '1);
    return (s[31:1] ^ (x[31:1] ^ y[31:1]));
  endfunction

  initial begin
    // 3 + 1 at level 1: the gray cell of column 1 is skipped, carry into bit 2 lost
    a = 32'd3; b = 32'd1; lvl = 3'b001; #1;
    check(c[1] == 1'b0, "3+1 level1 c[1] should be 0");
    lvl = 3'b000; #1;
    check(c[1] == 1'b1, "3+1 exact c[1] should be 1");
    // carry across bit 8 boundary: 0xFF + 1, level 2 (bits 0,1) -> c[15:8] group bypassed
    a = 32'h0000_FF00; b = 32'h0000_0100; lvl = 3'b000; #1;
    check(c[15] == 1'b1, "exact carry out of bit 15");
    for (int t = 0; t < 4000; t++) begin
      a = $urandom; b = $urandom; lvl = 3'b000; #1;
      check(c == ripple(a, b), $sformatf("exact carries a=%h b=%h", a, b));
      lvl = 3'($urandom_range(1, 7)); #1;
      check(c[30:0] == ref_carry(a, b, lvl), $sformatf("approx carries a=%h b=%h lvl=%b", a, b, lvl));
    end
    finish_tb();
  end
endmodule
