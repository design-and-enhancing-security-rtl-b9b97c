// logistic_map: one iteration of the fixed point logistic map,
//   x' = (r * x) * (1 - x)          (Q4.28, truncate and wrap)
//
// A start multiplexer picks the initial value x0 while `start` is high and the
// previous value `x_in` otherwise; the map is applied to the multiplexer
// output. The block is purely combinational: the z^-1 register that closes the
// iteration loop belongs to the instantiating generator, as in the design's
// cascade, where the logistic input comes from the fed-back tent output.
// Datapath (subtract 1 - x, multiply x * r, multiply the two) follows the
// design; the arithmetic rounding rule is this design's choice.
module logistic_map
  import chaos_pkg::*;
(
  input  logic start,
  input  fix_t r,
  input  fix_t x0,
  input  fix_t x_in,
  output fix_t x_out
);

  fix_t x, one_minus_x, rx;

  always_comb begin
    x           = start ? x0 : x_in;
    one_minus_x = FIX_ONE - x;
    rx          = fmul(x, r);
    x_out       = fmul(one_minus_x, rx);
  end

endmodule
