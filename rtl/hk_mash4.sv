`timescale 1ps / 1fs
// hk_mash4: 4th-order HK-MASH 1-1-1-1 digital delta-sigma modulator with
// dither at the last stage.
//
// Four HK error-feedback stages (hk_efm) are chained: stage 1 takes the
// N0-bit fractional word r, stage k+1 takes the residue e_k of stage k, all
// within one sample. The 1-bit outputs C1..C4 go to the noise-cancellation
// network, which forms c[n] = C1 + (1-z^-1)C2 + (1-z^-1)^2 C3 + (1-z^-1)^3 C4.
// Each stage adds a*c[n-1] with M - a prime, which makes the output sequence
// long for every constant input without any random source. An 8-bit LFSR
// word is added at the summing node of stage 4 only; after the network it
// is shaped by (1 - z^-1)^3, so it breaks up residual patterns without
// moving the mean of c[n]. The mean of c[n] is r/(M - a), which is r/M to
// within 3 parts in 2**20.
//
// Interface and timing: one sample per rising clock with en high (in the
// synthesizer, the divider output clock). r is sampled on that edge and the
// corresponding output appears in y right after it (y is registered, one
// sample of latency from r). y is signed, OW = ORDER+1 bits, range -7..+8
// for ORDER = 4. carry reports the four stage outputs C1..C4 of the last
// sample (C1 in bit 0), useful for observing the stages. dither_en = 0
// feeds zero in place of the LFSR word (the LFSR keeps running).
// Reset: asynchronous, active low.
//
// From the published design: 20-bit stages, 1-bit quantizers, a = 3 (M - a the
// largest prime below 2**20), the cancellation network and 8-bit dither at
// the last stage. This design's choice: the LFSR polynomial and seed, the
// dither enable, and the registered output.
module hk_mash4
  import fracn_pkg::*;
#(
  parameter int unsigned N0    = N0_DEF,
  parameter int unsigned A     = A_HK_DEF,
  parameter int unsigned ORDER = ORDER_DEF,
  parameter int unsigned DW    = DITHER_W,
  parameter int unsigned OW    = ORDER + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 dither_en,
  input  logic [N0-1:0]        r,
  output logic signed [OW-1:0] y,
  output logic [ORDER-1:0]     carry
);
  logic [N0-1:0]    stage_in [ORDER+1];
  logic [ORDER-1:0] c_now;
  logic [DW-1:0]    lfsr_q;
  logic [DW-1:0]    dith;

  dither_lfsr #(.W(DW), .SEED(DW'(LFSR_SEED))) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .q    (lfsr_q)
  );

  always_comb dith = dither_en ? lfsr_q : '0;
  assign stage_in[0] = r;

  for (genvar k = 0; k < ORDER; k++) begin : g_stage
    hk_efm #(.N0(N0), .A(A), .DW(DW)) u_efm (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .r    (stage_in[k]),
      .d    ((k == ORDER - 1) ? dith : DW'(0)),
      .c    (c_now[k]),
      .e    (stage_in[k+1])
    );
  end

  noise_cancel #(.K(ORDER), .OW(OW)) u_ncn (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .c    (c_now),
    .y    (y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  carry <= '0;
    else if (en) carry <= c_now;
  end
endmodule
