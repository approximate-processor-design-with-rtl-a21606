// Exact barrel shifter of the RV32I datapath: shift left logical, shift right
// logical and shift right arithmetic by 0-31 places. Combinational.
module shifter
  import approx_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [4:0]      shamt,
  input  shift_e          kind,
  output logic [XLEN-1:0] y
);
  always_comb begin
    unique case (kind)
      SH_SLL:  y = a << shamt;
      SH_SRL:  y = a >> shamt;
      SH_SRA:  y = $unsigned($signed(a) >>> shamt);
      default: y = '0;
    endcase
  end
endmodule
