// Dynamic operand sizing for the approximate datapath.
//
// Counts the leading zeros of each operand (a zero operand has XLEN leading
// zeros) and derives the number of active bits, XLEN - clz. The adder width is
// one more than the active width of the larger operand (room for the carry),
// capped at XLEN; the larger operand is picked with an unsigned compare, so a
// negative operand (no leading zeros) selects the full width. The multiplier
// width is the sum of the two active widths, capped at XLEN. Both widths are
// also returned as masks with the low add_size / mul_size bits set, which the
// sizeable adder and multiplier use to switch off their unused upper bits.
// The "+1" for the adder follows the text of the reference design (its C
// model omits it). Combinational.
module dynamic_sizing #(
  parameter int XLEN = 32
) (
  input  logic [XLEN-1:0]          op1,
  input  logic [XLEN-1:0]          op2,
  output logic [$clog2(XLEN):0]    add_size,
  output logic [$clog2(XLEN)+1:0]  mul_size,
  output logic [XLEN-1:0]          add_mask,
  output logic [XLEN-1:0]          mul_mask
);
  localparam int CW = $clog2(XLEN) + 1;  // holds 0..XLEN

  function automatic logic [CW-1:0] active_bits(input logic [XLEN-1:0] v);
    logic [CW-1:0] n;
    n = '0;
    for (int i = 0; i < XLEN; i++)
      if (v[i]) n = CW'(i + 1);
    return n;
  endfunction

  function automatic logic [XLEN-1:0] low_mask(input int unsigned n);
    logic [XLEN-1:0] m;
    for (int i = 0; i < XLEN; i++) m[i] = (i < n);
    return m;
  endfunction

  logic [CW-1:0] act1, act2, act_big;
  logic [CW:0]   sum_act;

  always_comb begin
    act1    = active_bits(op1);
    act2    = active_bits(op2);
    act_big = (op1 < op2) ? act2 : act1;
    add_size = (act_big == CW'(XLEN)) ? CW'(XLEN) : act_big + 1'b1;
    sum_act  = {1'b0, act1} + {1'b0, act2};
    mul_size = (sum_act > (CW+1)'(XLEN)) ? (CW+1)'(XLEN) : sum_act;
    add_mask = low_mask(int'(add_size));
    mul_mask = low_mask(int'(mul_size));
  end
endmodule
