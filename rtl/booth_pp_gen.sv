// Partial-product array of the N x N radix-4 Booth multiplier.
//
// The multiplier x is unsigned: it is extended with X(-1) = 0 below and
// X(N) = X(N+1) = 0 above, giving NPP = N/2 + 1 overlapping bit triplets and
// so NPP partial products (9 for N = 16). Each PP(i) (N+1 bits, from
// booth_encoder) is sign-extended, shifted left by 2i and cut to W bits. The
// +1 that completes a negative PP(i) is placed at column 2i of row i+1, which
// is empty there; the last PP is never negative (its top triplet bits are 0),
// so the array stays at NPP rows. The product of signed y and unsigned x
// modulo 2^W is the sum of the rows. Combinational.
module booth_pp_gen #(
  parameter int N   = 16,
  parameter int W   = 32,
  parameter int NPP = N / 2 + 1
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [W-1:0] rows [NPP]
);
  logic [N+2:0] xe;            // {X(N+1), X(N), X(N-1:0), X(-1)}
  logic [N:0]   pp  [NPP];
  logic         neg [NPP];

  assign xe = {2'b00, x, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_enc
    booth_encoder #(.N(N)) u_enc (
      .x_trip  (xe[2*i+2 -: 3]),
      .y       (y),
      .single  (),
      .double  (),
      .negative(neg[i]),
      .pp      (pp[i])
    );
  end

  always_comb begin
    for (int i = 0; i < NPP; i++) begin
      logic [W-1:0] ext;
      ext     = W'({{(W){pp[i][N]}}, pp[i]});
      rows[i] = ext << (2 * i);
      if (i > 0)
        rows[i][2*(i-1)] = neg[i-1];
    end
  end
endmodule
