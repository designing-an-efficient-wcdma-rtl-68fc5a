`timescale 1ps / 1fs
// pfd_tristate: tri-state phase-frequency detector.
//
// Two flip-flops with their data tied high: the reference edge sets UP and
// the divided-VCO edge sets DN. As soon as both are set they are cleared
// together, so the detector has three states (UP, DN, neither). UP is high
// for the time the reference leads and DN for the time it lags, which is
// also what makes the detector steer the loop towards the right frequency
// when the two inputs differ in frequency. When the loop is locked both
// pulses are narrow, so the charge pump is on only for a short part of the
// reference period.
//
// Interface and timing: up and dn rise on the rising edges of ref_clk and
// fb_clk; the clear is asynchronous and, in this zero-delay description,
// takes effect in the same instant the second flip-flop is set (a real
// circuit has a short reset delay here). rst_n (active low) clears both.
//
// From the published design: a tri-state PFD. This design's choice: the
// standard two-flip-flop and AND-reset implementation.
module pfd_tristate (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  logic clr;

  always_comb clr = (up & dn) | ~rst_n;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge fb_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end
endmodule
