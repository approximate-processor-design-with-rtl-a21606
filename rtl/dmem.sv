// Data memory (90 KB by default, at byte addresses BASE .. BASE+BYTES-1).
//
// Three ports on one word array:
//  * core port: synchronous read (rdata one clock after addr) and byte-enable
//    write, both by byte address;
//  * load port (ext_*): word writes used to place the data set before a run;
//  * result port: dbg_data is the byte at dbg_addr, read asynchronously, for
//    pulling results out after a run.
// Addresses outside the region read 0 and writes there are ignored. By
// default the region covers the 80 KB data area at 40 KB and the 10 KB stack
// area above it.
module dmem #(
  parameter int BYTES = 92160,
  parameter int BASE  = 40960
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [3:0]  be,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic        ext_we,
  input  logic [31:0] ext_addr,
  input  logic [31:0] ext_wdata,
  input  logic [16:0] dbg_addr,
  output logic [7:0]  dbg_data
);
  localparam int WORDS = BYTES / 4;
  localparam int AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  function automatic logic in_range(input logic [31:0] a);
    return (a >= 32'(BASE)) && (a < 32'(BASE + BYTES));
  endfunction

  function automatic logic [AW-1:0] widx(input logic [31:0] a);
    logic [31:0] off;
    off = a - 32'(BASE);
    return off[AW+1:2];
  endfunction

  always_ff @(posedge clk) begin
    if (in_range(addr)) begin
      for (int l = 0; l < 4; l++)
        if (be[l]) mem[widx(addr)][8*l +: 8] <= wdata[8*l +: 8];
    end
    if (ext_we && in_range(ext_addr))
      mem[widx(ext_addr)] <= ext_wdata;
    rdata <= in_range(addr) ? mem[widx(addr)] : 32'h0;
  end

  logic [31:0] dbg_full, dbg_word;
  assign dbg_full = {15'b0, dbg_addr};
  assign dbg_word = in_range(dbg_full) ? mem[widx(dbg_full)] : 32'h0;
  assign dbg_data = dbg_word[8*dbg_full[1:0] +: 8];
endmodule
