// lozi_map: one iteration of the fixed point Lozi map,
//   x' = (1 + y) - alpha * |x|
//   y' = beta * x                        (Q4.28, truncate and wrap)
//
// Two start multiplexers pick (x0, y0) while `start` is high and (x_in, y)
// otherwise. y is the only state kept here: beta times the multiplexed x is
// stored in a z^-1 register when `en` is high, so in the next iteration y
// holds beta*x of the previous one. x_out is combinational from x_in; the x
// loop register belongs to the instantiating generator. Structure follows the
// design's block diagram (absolute value ahead of the alpha multiplier);
// the asynchronous reset of y to 0 and the enable are this design's choice
// (y is never used before it is loaded, because start selects y0 first).
module lozi_map
  import chaos_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic start,
  input  fix_t alpha,
  input  fix_t beta,
  input  fix_t x0,
  input  fix_t y0,
  input  fix_t x_in,
  output fix_t x_out
);

  fix_t x, y, y_q, abs_x;

  always_comb begin
    x     = start ? x0 : x_in;
    y     = start ? y0 : y_q;
    abs_x = x[WL-1] ? -x : x;
    x_out = (FIX_ONE + y) - fmul(abs_x, alpha);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y_q <= '0;
    else if (en) y_q <= fmul(x, beta);
  end

endmodule
