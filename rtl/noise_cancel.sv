`timescale 1ps / 1fs
// noise_cancel: noise-cancellation network of a MASH 1-1-...-1 modulator.
//
// The 1-bit outputs C1..CK of the K error-feedback stages are combined in
// nested (Horner) form, last stage first:
//     S_K = C_K
//     S_k = C_k + (1 - z^-1) S_{k+1}      k = K-1 .. 1
//     Co  = S_1 = C1 + (1-z^-1) C2 + ... + (1-z^-1)^(K-1) C_K
// Each (1 - z^-1) is a differentiator: a register holding the previous
// value of its input and a subtractor. The quantization errors of stages
// 1..K-1 cancel and only the last stage's error remains, shaped by
// (1 - z^-1)^K. For K = 4 the output lies in -7..+8.
//
// Interface and timing: c[k-1] is C_k of the current sample. On each
// rising clock with en high the differentiator registers advance and the
// output register y takes Co[n]; y is a signed OW-bit value. Reset
// (asynchronous, active low) clears all registers.
//
// From the published design: the chain of three differentiators and adders.
// This design's choice: the output register, and no further (1 - z^-1)
// after the sum: the divider needs c[n] = Co[n], whose mean is the
// fractional word, so the output stage is not a differentiator here.
module noise_cancel #(
  parameter int unsigned K  = 4,
  parameter int unsigned OW = K + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [K-1:0]         c,
  output logic signed [OW-1:0] y
);
  logic signed [OW-1:0] s      [K];
  logic signed [OW-1:0] s_prev [K];

  always_comb begin
    s[K-1] = OW'(c[K-1]);
    for (int k = K - 2; k >= 0; k--)
      s[k] = OW'(c[k]) + s[k+1] - s_prev[k+1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) s_prev[k] <= '0;
      y <= '0;
    end else if (en) begin
      for (int k = 0; k < K; k++) s_prev[k] <= s[k];
      y <= s[0];
    end
  end
endmodule
