// Exact multiply/divide unit (RV32M) of the exact datapath.
//
// funct3 selects mul, mulh, mulhsu, mulhu, div, divu, rem or remu. Division by
// zero returns all ones (quotient) or the dividend (remainder); the signed
// overflow case -2^31 / -1 returns -2^31 with remainder 0, as the RISC-V
// specification requires. Combinational; the core gives it one execute cycle.
module muldiv
  import approx_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [2:0]      funct3,
  output logic [XLEN-1:0] y
);
  logic signed [2*XLEN-1:0] p_ss, p_su;
  logic        [2*XLEN-1:0] p_uu;
  logic                     b_zero, ovf;
  logic        [XLEN-1:0]   q_s, r_s, q_u, r_u;

  assign p_ss = $signed({{XLEN{a[XLEN-1]}}, a}) * $signed({{XLEN{b[XLEN-1]}}, b});
  assign p_su = $signed({{XLEN{a[XLEN-1]}}, a}) * $signed({{XLEN{1'b0}}, b});
  assign p_uu = {{XLEN{1'b0}}, a} * {{XLEN{1'b0}}, b};

  assign b_zero = (b == '0);
  assign ovf    = (a == 32'h8000_0000) && (b == '1);

  always_comb begin
    q_s = '1; r_s = a; q_u = '1; r_u = a;
    if (!b_zero) begin
      q_u = a / b;
      r_u = a % b;
      if (ovf) begin
        q_s = a;
        r_s = '0;
      end else begin
        q_s = $unsigned($signed(a) / $signed(b));
        r_s = $unsigned($signed(a) % $signed(b));
      end
    end
  end

  always_comb begin
    unique case (funct3)
      3'b000: y = p_uu[XLEN-1:0];
      3'b001: y = p_ss[2*XLEN-1:XLEN];
      3'b010: y = p_su[2*XLEN-1:XLEN];
      3'b011: y = p_uu[2*XLEN-1:XLEN];
      3'b100: y = q_s;
      3'b101: y = q_u;
      3'b110: y = r_s;
      default: y = r_u;
    endcase
  end
endmodule
