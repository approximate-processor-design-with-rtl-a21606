// Approximation Level Control Unit.
//
// Holds the three 3-bit approximation levels sent to the processor: one for
// approximate addition, one for subtraction and one for multiplication. The
// levels 0-3 travel as 000, 001, 011 and 111 (each set bit bypasses one more
// group of gray cells). They can be set in two ways, both synchronous:
//  * mode_we loads a power-saving mode 0-7, which sets all three levels from
//    the mode table (adder/subtractor/multiplier):
//      0: 0/0/0  1: 1/1/0  2: 1/1/1  3: 2/2/1
//      4: 2/2/2  5: 3/2/2  6: 3/3/2  7: 3/3/3
//  * lvl_we[0], [1], [2] write the adder, subtractor or multiplier level
//    directly (lvl_we wins over mode_we for the level it names).
// The new levels apply from the next clock, so the core can change accuracy
// between two instructions. rst (active high, synchronous) selects exact
// operation. How the user or cloud decides on a level is outside this unit.
module approx_level_ctrl
  import approx_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       mode_we,
  input  logic [2:0] mode,
  input  logic [2:0] lvl_we,
  input  logic [1:0] lvl_add,
  input  logic [1:0] lvl_sub,
  input  logic [1:0] lvl_mul,
  output logic [2:0] approx_level_add,
  output logic [2:0] approx_level_sub,
  output logic [2:0] approx_level_mul
);
  typedef struct packed {
    logic [1:0] add;
    logic [1:0] sub;
    logic [1:0] mul;
  } levels_t;

  function automatic levels_t mode_table(input logic [2:0] m);
    case (m)
      3'd0: return '{add: 2'd0, sub: 2'd0, mul: 2'd0};
      3'd1: return '{add: 2'd1, sub: 2'd1, mul: 2'd0};
      3'd2: return '{add: 2'd1, sub: 2'd1, mul: 2'd1};
      3'd3: return '{add: 2'd2, sub: 2'd2, mul: 2'd1};
      3'd4: return '{add: 2'd2, sub: 2'd2, mul: 2'd2};
      3'd5: return '{add: 2'd3, sub: 2'd2, mul: 2'd2};
      3'd6: return '{add: 2'd3, sub: 2'd3, mul: 2'd2};
      default: return '{add: 2'd3, sub: 2'd3, mul: 2'd3};
    endcase
  endfunction

  levels_t cur, nxt;

  always_comb begin
    nxt = cur;
    if (mode_we) nxt = mode_table(mode);
    if (lvl_we[0]) nxt.add = lvl_add;
    if (lvl_we[1]) nxt.sub = lvl_sub;
    if (lvl_we[2]) nxt.mul = lvl_mul;
  end

  always_ff @(posedge clk) begin
    if (rst) cur <= '0;
    else     cur <= nxt;
  end

  assign approx_level_add = level_code(cur.add);
  assign approx_level_sub = level_code(cur.sub);
  assign approx_level_mul = level_code(cur.mul);
endmodule
