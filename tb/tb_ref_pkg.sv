// Reference models shared by the testbenches.
//
// ref_approx_add models the approximate Sklansky adder without building the
// tree: the carry out of bit i is
//   c[0] = g[0]
//   c[i] = G(k..i) | (bypass(i) ? 0 : P(k..i) & c[k-1]),  k = 2^floor(log2 i)
// where G/P(k..i) are the exact group generate/propagate of bits k..i and
// bypass(i) is level bit 0 for i < 8, bit 1 for i < 16, bit 2 otherwise. The
// sum is p[i] ^ c[i-1] on the enabled bits. ref_xmul rebuilds the nine Booth
// rows arithmetically, reduces them with full-adder rows in the tree's order
// and adds the last two rows with ref_approx_add; ref_xadd and ref_xsub give
// the XADD/XSUB results. The other helpers compute the dynamic sizes and form
// a small RISC-V assembler used to build test programs.
package tb_ref_pkg;

  function automatic logic [31:0] ref_approx_add(input logic [31:0] a, input logic [31:0] b,
                                                  input logic [2:0] lvl, input logic [31:0] mask);
    logic [31:0] p, g, c, s;
    p = (a ^ b) & mask;
    g = (a & b) & mask;
    c[0] = g[0];
    for (int i = 1; i < 32; i++) begin
      int k;
      logic gg, pp, byp;
      k = 1;
      while (2 * k <= i) k = 2 * k;
      gg = 1'b0; pp = 1'b1;
      for (int j = k; j <= i; j++) begin
        gg = g[j] | (p[j] & gg);
        pp = pp & p[j];
      end
      byp = (i < 8) ? lvl[0] : (i < 16) ? lvl[1] : lvl[2];
      c[i] = gg | (byp ? 1'b0 : (pp & c[k-1]));
    end
    s[0] = p[0];
    for (int i = 1; i < 32; i++) s[i] = p[i] ^ c[i-1];
    return s & mask;
  endfunction

  function automatic int ref_active(input logic [31:0] v);
    for (int i = 31; i >= 0; i--) if (v[i]) return i + 1;
    return 0;
  endfunction

  function automatic logic [31:0] ref_mask(input int n);
    if (n >= 32) return 32'hFFFF_FFFF;
    return (32'h1 << n) - 1;
  endfunction

  function automatic int ref_add_size(input logic [31:0] a, input logic [31:0] b);
    int n;
    n = (a < b) ? ref_active(b) : ref_active(a);
    return (n >= 32) ? 32 : n + 1;
  endfunction

  function automatic int ref_mul_size(input logic [31:0] a, input logic [31:0] b);
    int n;
    n = ref_active(a) + ref_active(b);
    return (n > 32) ? 32 : n;
  endfunction

  function automatic logic [2:0] lvl_code(input int l);
    case (l)
      0: return 3'b000;
      1: return 3'b001;
      2: return 3'b011;
      default: return 3'b111;
    endcase
  endfunction


  // ---------------- approximate multiply reference ----------------
  // Booth rows from the recoded digits d_i in {-2..2} of the unsigned 16-bit
  // multiplier: row i holds d_i*y*4^i as a one's complement (for negative
  // digits) plus the +1 of row i-1 at column 2(i-1).
  function automatic void ref_booth_rows(input logic [15:0] x, input logic [15:0] y,
                                         output logic [31:0] rows [9]);
    logic [18:0] xe;
    logic [31:0] ys, mag;
    int d;
    logic negp;
    xe = {2'b00, x, 1'b0};
    ys = {{16{y[15]}}, y};
    negp = 1'b0;
    for (int i = 0; i < 9; i++) begin
      d = -2 * int'(xe[2*i+2]) + int'(xe[2*i+1]) + int'(xe[2*i]);
      mag = (d == 2 || d == -2) ? (ys << 1) : (d == 0 ? 32'h0 : ys);
      rows[i] = (xe[2*i+2] ? ~mag : mag) << (2 * i);
      if (i > 0) rows[i][2*(i-1)] = negp;
      negp = xe[2*i+2];
    end
  endfunction

  function automatic void ref_fa_row(input logic [31:0] a, input logic [31:0] b, input logic [31:0] c,
                                     output logic [31:0] s, output logic [31:0] cy);
    s  = a ^ b ^ c;
    cy = ((a & b) | (a & c) | (b & c)) << 1;
  endfunction

  function automatic void ref_wallace(input logic [31:0] r [9], output logic [31:0] s, output logic [31:0] cy);
    logic [31:0] s1a, c1a, s1b, c1b, s1c, c1c, s2a, c2a, s2b, c2b, t, tc, hc;
    ref_fa_row(r[0], r[1], r[2], s1a, c1a);
    ref_fa_row(r[3], r[4], r[5], s1b, c1b);
    ref_fa_row(r[6], r[7], r[8], s1c, c1c);
    ref_fa_row(s1a, c1a, s1b, s2a, c2a);
    ref_fa_row(c1b, s1c, c1c, s2b, c2b);
    // 4:2 row: first full adder gives a horizontal carry into the next column
    ref_fa_row(s2a, c2a, s2b, t, hc);
    ref_fa_row(t, c2b, hc, s, tc);
    cy = tc;
  endfunction

  function automatic logic [31:0] ref_xmul(input logic [31:0] a, input logic [31:0] b, input logic [2:0] lvl);
    logic [31:0] ac, bc, rows [9], s, cy;
    ac = b[31] ? -a : a;
    bc = b[31] ? -b : b;
    ref_booth_rows(bc[15:0], ac[15:0], rows);
    ref_wallace(rows, s, cy);
    return ref_approx_add(s, cy, lvl, ref_mask(ref_mul_size(a, b)));
  endfunction

  function automatic logic [31:0] ref_xadd(input logic [31:0] a, input logic [31:0] b, input logic [2:0] lvl);
    return ref_approx_add(a, b, lvl, ref_mask(ref_add_size(a, b)));
  endfunction

  function automatic logic [31:0] ref_xsub(input logic [31:0] a, input logic [31:0] b, input logic [2:0] lvl);
    return ref_approx_add(a, -b, lvl, 32'hFFFF_FFFF);
  endfunction

  // ---------------- tiny RV32 assembler ----------------
  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] opc);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] opc);
    return {12'(imm), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] s_type(input int imm, input int rs2, input int rs1, input logic [2:0] f3);
    logic [11:0] im;
    im = 12'(imm);
    return {im[11:5], 5'(rs2), 5'(rs1), f3, im[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [12:0] im;
    im = 13'(off);
    return {im[12], im[10:5], 5'(rs2), 5'(rs1), f3, im[4:1], im[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_type(input int imm20, input int rd, input logic [6:0] opc);
    return {20'(imm20), 5'(rd), opc};
  endfunction
  function automatic logic [31:0] j_type(input int off, input int rd);
    logic [20:0] im;
    im = 21'(off);
    return {im[20], im[10:1], im[11], im[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] ADD (int rd, int rs1, int rs2); return r_type(7'b0000000, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (int rd, int rs1, int rs2); return r_type(7'b0100000, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] MUL (int rd, int rs1, int rs2); return r_type(7'b0000001, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] DIV (int rd, int rs1, int rs2); return r_type(7'b0000001, rs2, rs1, 3'b100, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XADD(int rd, int rs1, int rs2); return r_type(7'b1000000, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XSUB(int rd, int rs1, int rs2); return r_type(7'b1100000, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XMUL(int rd, int rs1, int rs2); return r_type(7'b1000001, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLL (int rd, int rs1, int rs2); return r_type(7'b0000000, rs2, rs1, 3'b001, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT (int rd, int rs1, int rs2); return r_type(7'b0000000, rs2, rs1, 3'b010, rd, 7'b0110011); endfunction
  function automatic logic [31:0] ADDI(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI(int rd, int rs1, int sh);  return i_type(sh,  rs1, 3'b001, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI(int rd, int rs1, int sh);  return i_type(sh | 32'h400, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] LW  (int rd, int rs1, int imm); return i_type(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LB  (int rd, int rs1, int imm); return i_type(imm, rs1, 3'b000, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LHU (int rd, int rs1, int imm); return i_type(imm, rs1, 3'b101, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SW  (int rs2, int rs1, int imm); return s_type(imm, rs2, rs1, 3'b010); endfunction
  function automatic logic [31:0] SB  (int rs2, int rs1, int imm); return s_type(imm, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] BEQ (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] BNE (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] BLT (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b100); endfunction
  function automatic logic [31:0] BGE (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b101); endfunction
  function automatic logic [31:0] LUI (int rd, int imm20);  return u_type(imm20, rd, 7'b0110111); endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20); return u_type(imm20, rd, 7'b0010111); endfunction
  function automatic logic [31:0] JAL (int rd, int off);    return j_type(off, rd); endfunction
  function automatic logic [31:0] JALR(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] BLTU(int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b110); endfunction
  function automatic logic [31:0] BGEU(int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b111); endfunction
  function automatic logic [31:0] ANDI(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b111, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRLI(int rd, int rs1, int sh);  return i_type(sh, rs1, 3'b101, rd, 7'b0010011); endfunction
  localparam logic [31:0] EBREAK = 32'h0010_0073;

endpackage
