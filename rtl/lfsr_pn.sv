// lfsr_pn: 32-bit Fibonacci LFSR pseudo number (PN) generator.
//
// The feedback bit is the XOR of the state bits selected by POLY (default
// 32'h40102001, the design's feedback polynomial: bits 30, 20, 13 and 0) and
// is shifted in at bit 0 while the state moves one place towards the MSB.
// That bit convention is this design's reading of the polynomial word.
// While `start` is high the generator works from `seed` (default 32'h0BFD97C8
// in chaos_pkg::DEFAULT_KEY) instead of its register, the same start-mux
// scheme the chaotic maps use, so the seed is part of the cipher key.
// `dout` is the 8 least significant bits of the current state; the state
// advances on every clock with `en` high.
module lfsr_pn #(
  parameter int          WIDTH = 32,
  parameter logic [31:0] POLY  = 32'h4010_2001
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             start,
  input  logic [WIDTH-1:0] seed,
  output logic [7:0]       dout,
  output logic [WIDTH-1:0] state
);

  logic [WIDTH-1:0] s_q, s_next;
  logic             fb;

  always_comb begin
    state  = start ? seed : s_q;
    fb     = ^(state & POLY[WIDTH-1:0]);
    s_next = {state[WIDTH-2:0], fb};
    dout   = state[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s_q <= '0;
    else if (en) s_q <= s_next;
  end

endmodule
