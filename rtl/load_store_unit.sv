// Load/store unit: aligns store data and extracts load data.
//
// For a store, funct3 (sb/sh/sw) and the two low address bits give the byte
// enables and shift rs2 into the addressed lanes. For a load, the addressed
// byte or half-word of the memory word is extracted and sign- or
// zero-extended (lb, lh, lw, lbu, lhu). Accesses that are not naturally
// aligned are flagged in misaligned; they are not split. Combinational.
module load_store_unit
  import approx_pkg::*;
(
  input  logic [XLEN-1:0] addr,
  input  logic [2:0]      funct3,
  input  logic [XLEN-1:0] store_data,
  input  logic [XLEN-1:0] rdata_word,
  output logic [XLEN-1:0] wdata,
  output logic [3:0]      be,
  output logic [XLEN-1:0] load_data,
  output logic            misaligned
);
  logic [1:0]  off;
  logic [31:0] shifted;

  assign off     = addr[1:0];
  assign shifted = rdata_word >> (8 * off);

  always_comb begin
    unique case (funct3[1:0])
      2'b00: begin
        be         = 4'b0001 << off;
        wdata      = {4{store_data[7:0]}};
        misaligned = 1'b0;
      end
      2'b01: begin
        be         = 4'b0011 << off;
        wdata      = {2{store_data[15:0]}};
        misaligned = off[0];
      end
      default: begin
        be         = 4'b1111;
        wdata      = store_data;
        misaligned = (off != 2'b00);
      end
    endcase
  end

  always_comb begin
    unique case (funct3)
      3'b000:  load_data = {{24{shifted[7]}}, shifted[7:0]};
      3'b001:  load_data = {{16{shifted[15]}}, shifted[15:0]};
      3'b100:  load_data = {24'b0, shifted[7:0]};
      3'b101:  load_data = {16'b0, shifted[15:0]};
      default: load_data = rdata_word;
    endcase
  end
endmodule
