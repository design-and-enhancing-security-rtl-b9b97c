// tent_map: one iteration of the fixed point tent map,
//   x' = mu * x        if x <= 0.5
//   x' = mu * (1 - x)  otherwise          (Q4.28, truncate and wrap)
//
// A start multiplexer picks x0 while `start` is high and `x_in` otherwise.
// A signed comparator against the constant 0.5 selects between the two
// products, as in the design's block diagram. Combinational; the loop register
// is in the instantiating generator. The comparison is signed, so a negative
// input (which the cascade can deliver) takes the mu*x branch.
module tent_map
  import chaos_pkg::*;
(
  input  logic start,
  input  fix_t mu,
  input  fix_t x0,
  input  fix_t x_in,
  output fix_t x_out
);

  fix_t x;
  logic low;

  always_comb begin
    x     = start ? x0 : x_in;
    low   = (x <= FIX_HALF);
    x_out = low ? fmul(x, mu) : fmul(FIX_ONE - x, mu);
  end

endmodule
