// Self-checking test of the data memory: region decoding at 40 KB, byte-enable
// writes, load-port writes, registered reads and the byte-wide result port.
module tb_dmem;
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
  logic [31:0] addr, wdata, rdata, ea, ed;
  logic [3:0]  be;
  logic        ew;
  logic [16:0] da;
  logic [7:0]  dd;
  dmem #(.BYTES(92160), .BASE(40960)) dut (.clk(clk), .addr(addr), .be(be), .wdata(wdata), .rdata(rdata),
    .ext_we(ew), .ext_addr(ea), .ext_wdata(ed), .dbg_addr(da), .dbg_data(dd));
  initial begin
    be = 0; ew = 0; addr = 32'd40960; wdata = 0; ea = 0; ed = 0; da = 0;
    @(negedge clk); ew = 1; ea = 32'd40960; ed = 32'h4433_2211;
    @(negedge clk); ew = 1; ea = 32'd133116; ed = 32'hCAFE_F00D;   // last word of the stack area
    @(negedge clk); ew = 1; ea = 32'd100; ed = 32'h1;             // below the region: ignored
    @(negedge clk); ew = 0; addr = 32'd40960;
    @(posedge clk); #1; check(rdata == 32'h4433_2211, "load-port word");
    @(negedge clk); be = 4'b0100; wdata = 32'h00AA_0000;
    @(negedge clk); be = 0;
    @(posedge clk); #1; check(rdata == 32'h44AA_2211, "byte write lane 2");
    da = 17'd40962; #1; check(dd == 8'hAA, "result port byte 2");
    da = 17'd40963; #1; check(dd == 8'h44, "result port byte 3");
    da = 17'd100; #1; check(dd == 8'h00, "outside region reads 0");
    @(negedge clk); addr = 32'd133116;
    @(posedge clk); #1; check(rdata == 32'hCAFE_F00D, "top of the 90 KB region");
    for (int t = 0; t < 500; t++) begin
      logic [31:0] a, v;
      a = 32'd40960 + 4 * $urandom_range(0, 23039); v = $urandom;
      @(negedge clk); addr = a; be = 4'hF; wdata = v;
      @(negedge clk); be = 0;
      @(posedge clk); #1; check(rdata == v, "random word");
    end
    finish_tb();
  end
endmodule
