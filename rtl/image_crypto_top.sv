// image_crypto_top: chaotic stream cipher for 8-bit image pixels, encryption
// and decryption side by side.
//
// A transmitter key generator (fpccm_prnbg) produces one key byte per pixel;
// the plain pixel XOR that byte is the cipher pixel. A receiver key generator
// with its own key produces the same byte stream when the keys match, and the
// cipher pixel XOR that byte is the decrypted pixel. Pixels are streamed one
// per clock (row-major, as the host flattens a 256x256 image), so the
// throughput is 8 bits per clock.
//
// Interface: pix_valid/pix_in carry the plain stream; both generators advance
// only on cycles with pix_valid high (a clock enable this design adds so that
// the stream may have gaps). cipher_out and plain_out are combinational from
// pix_in in the same cycle, as in the design's model, with out_valid equal to
// pix_valid. After reset the first valid pixel is XORed with the key byte
// computed from the initial values. A new image needs a reset to restart the
// key streams.
module image_crypto_top
  import chaos_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_valid,
  input  logic [7:0] pix_in,
  input  key_t       key_tx,
  input  key_t       key_rx,
  output logic [7:0] cipher_out,
  output logic [7:0] plain_out,
  output logic       out_valid
);

  logic [7:0] kbyte_tx, kbyte_rx;

  fpccm_prnbg u_tx (.clk, .rst_n, .en(pix_valid), .key(key_tx), .kbyte(kbyte_tx));
  fpccm_prnbg u_rx (.clk, .rst_n, .en(pix_valid), .key(key_rx), .kbyte(kbyte_rx));

  always_comb begin
    cipher_out = pix_in ^ kbyte_tx;
    plain_out  = cipher_out ^ kbyte_rx;
    out_valid  = pix_valid;
  end

endmodule
