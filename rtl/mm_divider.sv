`timescale 1ps / 1fs
// mm_divider: multi-modulus frequency divider, divide by N + c[n].
//
// A down-counter clocked by the VCO output. When it reaches zero it reloads
// with ratio - 1, where ratio = n_int + c is taken at that moment, and it
// raises div_out for one input clock. The output therefore has exactly one
// rising edge every ratio input cycles, and each output period uses the
// modulator value present when the period started. The output edge is the
// feedback clock for the phase detector and the sample clock of the
// delta-sigma modulator, so a new c[n] is ready long before the next reload.
//
// Interface: n_int (unsigned NW bits) is the integer part N, c (signed CW
// bits) the modulator output; ratio_q shows the ratio of the current output
// period. Timing: div_out and ratio_q are registered on the rising clock.
// Reset (asynchronous, active low) clears the counter so the first output
// edge follows one clock after reset is released.
//
// From the published design: a divider whose ratio is N + c[n]. This design's
// choice: the counter implementation, the one-cycle output pulse and a
// floor of 2 on the ratio (never reached with the intended N around 98).
module mm_divider #(
  parameter int unsigned NW = 8,
  parameter int unsigned CW = 5,
  parameter int unsigned RW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NW-1:0]        n_int,
  input  logic signed [CW-1:0] c,
  output logic                 div_out,
  output logic [RW-1:0]        ratio_q
);
  logic [RW-1:0]        cnt;
  logic signed [RW+1:0] ratio_s;
  logic [RW-1:0]        ratio;

  always_comb begin
    ratio_s = $signed({2'b00, RW'(n_int)}) + (RW+2)'(c);
    if (ratio_s < 2) ratio = RW'(2);
    else             ratio = ratio_s[RW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      div_out <= 1'b0;
      ratio_q <= '0;
    end else if (cnt == '0) begin
      cnt     <= ratio - RW'(1);
      ratio_q <= ratio;
      div_out <= 1'b1;
    end else begin
      cnt     <= cnt - RW'(1);
      div_out <= 1'b0;
    end
  end
endmodule
