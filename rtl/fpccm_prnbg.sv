// fpccm_prnbg: the proposed key byte generator, cascade chaotic maps XOR PN.
//
//   kbyte = fpccm_prbg key byte XOR (8 LSBs of the 32-bit LFSR)
//
// Both generators share one start pulse (inside fpccm_prbg) and one enable,
// so they stay in step: one key byte per enabled clock, the first one in the
// cycle after reset in which `en` is first high. The whole 288-bit key (eight
// map words and the 32-bit LFSR seed) comes in on `key`.
module fpccm_prnbg
  import chaos_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  key_t       key,
  output logic [7:0] kbyte
);

  logic [7:0]  chaos_byte, pn_byte;
  logic        start;

  fpccm_prbg u_cascade (
    .clk, .rst_n, .en, .key, .x_out(), .kbyte(chaos_byte), .start
  );

  lfsr_pn u_pn (
    .clk, .rst_n, .en, .start, .seed(key.pn_seed), .dout(pn_byte), .state()
  );

  assign kbyte = chaos_byte ^ pn_byte;

endmodule
