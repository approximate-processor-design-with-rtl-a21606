// Radix-4 Booth encoder and selector for one partial product.
//
// From the three multiplier bits x_trip = {X(2i+1), X(2i), X(2i-1)} the
// encoder makes the select signals
//   single   = X(2i) ^ X(2i-1)                      (take Y)
//   double   = X(2i+1)&~X(2i)&~X(2i-1) | ~X(2i+1)&X(2i)&X(2i-1)  (take 2Y)
//   negative = X(2i+1)                              (negate)
// and the selector forms each bit of PP(i)[N:0] as
//   ((single & Y[j]) | (double & Y[j-1])) ^ negative,   Y[-1] = 0,
// with Y read as a signed N-bit value (Y[N] = Y[N-1]). A negative partial
// product is thus a one's complement; the +1 that completes the negation is
// added by the partial-product array (booth_pp_gen). Combinational.
module booth_encoder #(
  parameter int N = 16
) (
  input  logic [2:0]   x_trip,
  input  logic [N-1:0] y,
  output logic         single,
  output logic         double,
  output logic         negative,
  output logic [N:0]   pp
);
  logic [N:0]   y_ext;   // Y sign-extended to N+1 bits
  logic [N:0]   y_dbl;   // 2Y in N+1 bits

  assign single   = x_trip[1] ^ x_trip[0];
  assign double   = (x_trip[2] & ~x_trip[1] & ~x_trip[0]) |
                    (~x_trip[2] & x_trip[1] & x_trip[0]);
  assign negative = x_trip[2];

  assign y_ext = {y[N-1], y};
  assign y_dbl = {y, 1'b0};

  always_comb
    for (int j = 0; j <= N; j++)
      pp[j] = ((single & y_ext[j]) | (double & y_dbl[j])) ^ negative;
endmodule
