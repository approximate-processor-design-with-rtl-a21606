// Instruction memory (40 KB by default, starting at byte address 0).
//
// One synchronous read port for instruction fetch: rdata holds the word at
// raddr one clock after raddr is presented. One write port loads the program
// word by word before the core is started. Addresses are byte addresses; the
// two low bits are ignored and words beyond BYTES read 0.
module imem #(
  parameter int BYTES = 40960
) (
  input  logic        clk,
  input  logic [31:0] raddr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  localparam int WORDS = BYTES / 4;
  localparam int AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] ridx, widx;

  assign ridx = raddr[AW+1:2];
  assign widx = waddr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we && waddr[31:2] < 30'(WORDS))
      mem[widx] <= wdata;
    rdata <= (raddr[31:2] < 30'(WORDS)) ? mem[ridx] : 32'h0;
  end
endmodule
