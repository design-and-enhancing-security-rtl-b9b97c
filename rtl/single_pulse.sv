// single_pulse: start pulse for the chaotic generators.
//
// A single register whose next value is the XOR of its own output with itself,
// i.e. 0, so its output is 1 only until the first clock edge that it takes.
// The register comes out of reset at 1 (the reset value is this design's
// choice; the structure follows the design's pulse block). The clock enable
// `en` is an addition of this design: the pulse stays high until the first
// enabled cycle, so the generators load their seeds together with the first
// valid pixel.
//
// Ports: clk, rst_n (asynchronous, active low), en, pulse (registered output).
module single_pulse (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic pulse
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pulse <= 1'b1;
    else if (en) pulse <= pulse ^ pulse;
  end

endmodule
