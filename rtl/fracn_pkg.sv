`timescale 1ps / 1fs
// fracn_pkg: constants and types shared by the fractional-N synthesizer.
//
// The modulator is a 4th-order MASH built from 20-bit HK error-feedback
// stages. Each stage adds a*c[n-1] to its accumulator, where a is chosen so
// that M - a is the largest prime below M = 2**N0; for N0 = 20 this is
// 2**20 - 3 = 1048573, so a = 3. The stage outputs are one bit each; after the
// noise-cancellation network the output c[n] of a 4th-order MASH 1-1-1-1 lies
// in -7..+8 and is carried as a 5-bit signed value. The dither source is an
// 8-bit LFSR. The 20 MHz reference, 1.965 GHz output and the integer part 98
// (fractional word 2**18 = 0.25) follow the design targets; the widths of the
// integer division word are this design's own choice.
package fracn_pkg;
  localparam int unsigned N0_DEF      = 20;  // accumulator word length
  localparam int unsigned ORDER_DEF   = 4;   // MASH order (stages)
  localparam int unsigned A_HK_DEF    = 3;   // 2**20 - 3 is prime
  localparam int unsigned DITHER_W    = 8;   // LFSR length
  localparam int unsigned NINT_W      = 8;   // integer division word
  localparam int unsigned RATIO_W     = 8;   // divider ratio N + c
  localparam int unsigned MASH_W      = ORDER_DEF + 1; // signed c[n], -7..+8

  // reset value / power-up value of the dither register (any non-zero word)
  localparam logic [DITHER_W-1:0] LFSR_SEED = 8'hA5;
endpackage
