// Self-checking test of the instruction memory: words written through the
// load port read back one clock after the address, beyond the end reads 0.
module tb_imem;
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
  initial begin repeat (200000) @(posedge clk); failures++; $display("watchdog expired"); finish_tb(); end
  logic [31:0] raddr, rdata, waddr, wdata;
  logic        we;
  imem #(.BYTES(40960)) dut (.clk(clk), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));
  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 10240; i += 97) begin
      @(negedge clk); we = 1; waddr = 32'(4 * i); wdata = 32'(i * 32'h9E3779B1);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 10240; i += 97) begin
      @(negedge clk); raddr = 32'(4 * i);
      @(posedge clk); #1; check(rdata == 32'(i * 32'h9E3779B1), $sformatf("word %0d", i));
    end
    @(negedge clk); raddr = 32'd40960; @(posedge clk); #1; check(rdata == 0, "beyond 40 KB reads 0");
    finish_tb();
  end
endmodule
