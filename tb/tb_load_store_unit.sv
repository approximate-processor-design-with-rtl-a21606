// Self-checking test of the load/store unit: byte enables, lane placement of
// store data, load extraction with sign/zero extension, misalignment flag.
module tb_load_store_unit;
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
  logic [31:0] addr, sd, rw, wdata, ld;
  logic [2:0]  f3;
  logic [3:0]  be;
  logic        mis;
  load_store_unit dut (.addr(addr), .funct3(f3), .store_data(sd), .rdata_word(rw), .wdata(wdata), .be(be), .load_data(ld), .misaligned(mis));
  initial begin
    rw = 32'h8081_F203; sd = 32'h1122_3344;
    addr = 32'hA001; f3 = 3'b000; #1; check(be == 4'b0010 && wdata[15:8] == 8'h44, "sb lane 1");
    check(ld == 32'hFFFF_FFF2, "lb sign extends");
    f3 = 3'b100; #1; check(ld == 32'h0000_00F2, "lbu");
    addr = 32'hA002; f3 = 3'b001; #1; check(be == 4'b1100 && wdata[31:16] == 16'h3344 && !mis, "sh upper");
    check(ld == 32'hFFFF_8081, "lh");
    f3 = 3'b101; #1; check(ld == 32'h0000_8081, "lhu");
    addr = 32'hA003; #1; check(mis, "misaligned half");
    addr = 32'hA000; f3 = 3'b010; #1; check(be == 4'hF && wdata == sd && ld == rw && !mis, "word");
    addr = 32'hA002; #1; check(mis, "misaligned word");
    for (int t = 0; t < 2000; t++) begin
      logic [1:0] o;
      rw = $urandom; addr = $urandom; o = addr[1:0];
      f3 = 3'b000; #1; check(ld == 32'($signed(rw[8*o +: 8])), "lb random");
      f3 = 3'b100; #1; check(ld == 32'(rw[8*o +: 8]), "lbu random");
    end
    finish_tb();
  end
endmodule
