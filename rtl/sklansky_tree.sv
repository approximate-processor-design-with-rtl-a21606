// Approximate Sklansky parallel-prefix carry tree.
//
// Takes the bitwise propagate (p0 = a^b) and generate (g0 = a&b) vectors and
// returns c[i], the group generate G[i:0], i.e. the carry out of bit i. Row r
// (r = 1..log2 WIDTH) combines each column i whose bit r-1 is set with column
// k-1, the last column of the lower half of its 2^r block. A cell whose group
// would then reach column 0 is a "gray" cell (only G is needed); the others
// are "black" cells (G and P). Columns without a cell pass P and G through.
//
// Approximation: a gray cell can be bypassed, forwarding G[i:k] of the row
// above instead of G[i:k] | P[i:k] & G[k-1:0]. Bypass is grouped as in the
// reference design: approx_level[0] covers the gray cells of columns 1-7
// (rows 1-3, the least significant byte), approx_level[1] those of columns
// 8-15 (row 4) and approx_level[2] those of columns 16-31 (row 5). Each bit
// acts on its own; the processor drives them with the codes 000/001/011/111.
// Purely combinational. WIDTH must be a power of two of at least 32 for the
// grouping above; the tree shape itself is generic.
module sklansky_tree #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] g0,
  input  logic [WIDTH-1:0] p0,
  input  logic [2:0]       approx_level,
  output logic [WIDTH-1:0] c
);
  localparam int ROWS = $clog2(WIDTH);

  logic [WIDTH-1:0] g [ROWS+1];
  logic [WIDTH-1:0] p [ROWS+1];

  assign g[0] = g0;
  assign p[0] = p0;

  // Bypass control of the gray cell in a given column.
  function automatic logic gray_bypass(input int col, input logic [2:0] lvl);
    if (col < 8)       return lvl[0];
    else if (col < 16) return lvl[1];
    else               return lvl[2];
  endfunction

  for (genvar r = 1; r <= ROWS; r++) begin : g_row
    localparam int HALF = 1 << (r - 1);
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      if ((i & HALF) == 0) begin : g_pass
        // white cell: buffer
        assign g[r][i] = g[r-1][i];
        assign p[r][i] = p[r-1][i];
      end else begin : g_cell
        localparam int K1 = (i & ~(2*HALF - 1)) + HALF - 1; // column k-1
        if (i < 2*HALF) begin : g_gray
          // group reaches column 0: gray cell, optionally bypassed
          logic bypass;
          assign bypass  = gray_bypass(i, approx_level);
          assign g[r][i] = bypass ? g[r-1][i]
                                  : (g[r-1][i] | (p[r-1][i] & g[r-1][K1]));
          assign p[r][i] = p[r-1][i];
        end else begin : g_black
          assign g[r][i] = g[r-1][i] | (p[r-1][i] & g[r-1][K1]);
          assign p[r][i] = p[r-1][i] & p[r-1][K1];
        end
      end
    end
  end

  assign c = g[ROWS];
endmodule
