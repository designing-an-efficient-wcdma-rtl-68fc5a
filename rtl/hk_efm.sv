`timescale 1ps / 1fs
// hk_efm: one first-order HK error-feedback modulator stage (HK-EFM1).
//
// Each sample the stage forms
//     u[n] = r[n] + d[n] + a*c[n-1] + e[n-1]
//     c[n] = 1 when u[n] >= M (M = 2**N0), else 0
//     e[n] = u[n] - M*c[n]
// which is the digital accumulator of the first-order error-feedback
// modulator with the extra a*z^-1 path from the output back to the input
// summing node. With M - a prime the output sequence for a constant input
// is long (period M - a), and the signal transfer function is
// 1/(1 - (a/M) z^-1), so the mean of c is (r + mean d)/(M - a).
// c[n] is the 1-bit quantizer output (the accumulator carry) and e[n] the
// N0-bit residue that feeds the next stage of a MASH. d[n] is an extra input
// added at the same summing node (the dither word); tie it to zero in the
// stages without dither.
//
// Interface and timing: c and e are combinational functions of the inputs
// and of the two state registers (c[n-1], e[n-1]), as in the block diagram,
// so stages can be chained within one clock. On each rising clock with en
// high the registers take c[n] and e[n]. Reset (asynchronous, active low)
// clears both.
//
// From the published design: the structure, the 1-bit quantizer, the 20-bit
// accumulator and the rule that M - a is prime (a = 3 at 20 bits). This
// design's choice: the residue is N0 bits wide,
// so in the case u[n] >= 2M (not reached for inputs below M - a and
// residues fed from an earlier stage in simulation) the excess would be
// dropped as in an N0-bit hardware accumulator.
module hk_efm #(
  parameter int unsigned N0 = 20,
  parameter int unsigned A  = 3,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [N0-1:0] r,
  input  logic [DW-1:0] d,
  output logic          c,
  output logic [N0-1:0] e
);
  localparam int unsigned UW = N0 + 2;

  logic          c_q;   // c[n-1]
  logic [N0-1:0] e_q;   // e[n-1]
  logic [UW-1:0] u;

  always_comb begin
    u = UW'(r) + UW'(d) + UW'(e_q) + (c_q ? UW'(A) : '0);
    c = (u >= (UW'(1) << N0));
    e = u[N0-1:0];  // u - M*c while u < 2M
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= 1'b0;
      e_q <= '0;
    end else if (en) begin
      c_q <= c;
      e_q <= e;
    end
  end
endmodule
