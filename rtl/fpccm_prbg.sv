// fpccm_prbg: fixed point cascade chaotic map pseudo random byte generator.
//
// The logistic, Lozi and tent maps are chained combinationally: the logistic
// output feeds the Lozi map, the Lozi output feeds the tent map, and the tent
// output is stored in a z^-1 register that feeds the logistic map in the next
// iteration. One iteration of the whole cascade is done per enabled clock.
// In the start cycle (single pulse high) every map takes its own initial
// value from the key instead of its input, as each map's start multiplexer
// does in the design. The output key byte is the 8 least significant bits of
// the tent output (bit choice is this design's). x_out is valid in the same
// cycle as `en` (combinational from the registers), so the first byte, in the
// start cycle, is tent(x0_tent).
//
// The path register -> logistic -> Lozi -> tent -> register holds six 32x32
// multipliers in series; it sets the clock rate.
module fpccm_prbg
  import chaos_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  key_t       key,
  output fix_t       x_out,
  output logic [7:0] kbyte,
  output logic       start
);

  fix_t fb_q, x_log, x_lozi;

  single_pulse u_pulse (.clk, .rst_n, .en, .pulse(start));

  logistic_map u_log (
    .start, .r(key.log_r), .x0(key.log_x0), .x_in(fb_q), .x_out(x_log)
  );

  lozi_map u_lozi (
    .clk, .rst_n, .en, .start,
    .alpha(key.lozi_a), .beta(key.lozi_b), .x0(key.lozi_x0), .y0(key.lozi_y0),
    .x_in(x_log), .x_out(x_lozi)
  );

  tent_map u_tent (
    .start, .mu(key.tent_mu), .x0(key.tent_x0), .x_in(x_lozi), .x_out(x_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  fb_q <= '0;
    else if (en) fb_q <= x_out;
  end

  assign kbyte = x_out[7:0];

endmodule
