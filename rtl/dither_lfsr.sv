`timescale 1ps / 1fs
// dither_lfsr: 8-bit linear feedback shift register used as the dither source.
//
// A Fibonacci LFSR with the maximal-length polynomial x^8 + x^6 + x^5 + x^4 + 1
// steps once per enabled clock and presents its whole state as an unsigned
// dither word. Its period is 2**8 - 1 = 255 and the all-zero word never
// occurs. The word is added at the summing node of the last MASH stage,
// where the cancellation network shapes it by (1 - z^-1)^3 so it leaves the
// mean of the modulator output unchanged.
//
// Interface and timing: q is registered; it changes on the rising clock
// when en is high. Reset (asynchronous, active low) loads SEED.
//
// From the published design: an 8-bit LFSR as the only dither hardware. This
// design's choice: the polynomial, the seed, and using the full 8-bit state
// as the dither word.
module dither_lfsr #(
  parameter int unsigned            W    = 8,
  parameter logic [W-1:0]           SEED = 8'hA5,
  parameter logic [W-1:0]           TAPS = 8'b1011_1000  // x^8+x^6+x^5+x^4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] q
);
  logic fb;

  always_comb fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= SEED;
    else if (en) q <= {q[W-2:0], fb};
  end
endmodule
