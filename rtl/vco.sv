`timescale 1ps / 1fs
// vco: behavioural model of the voltage-controlled oscillator (analog part,
// not synthesizable logic).
//
// The output frequency is F0_HZ + KV_HZ_PER_V * vctrl, limited to
// FMIN_HZ..FMAX_HZ. Each half period is computed from the control voltage
// at the moment the previous edge occurs, so the oscillator phase is
// continuous and frequency changes take effect within one half period.
//
// Interface and timing: vctrl (real, volts), clk_out (square wave, starts
// low at time 0). The timescale is 1 ps with 1 fs precision, enough for a
// period near 509 ps.
//
// From the published design: a VCO of gain Kv around the 1.965 GHz output.
// This design's choice: Kv = 50 MHz/V and a free-running frequency of
// 1.94 GHz at 0 V, so that 1.965 GHz needs 0.5 V.
module vco #(
  parameter real F0_HZ       = 1.94e9,
  parameter real KV_HZ_PER_V = 50.0e6,
  parameter real FMIN_HZ     = 1.5e9,
  parameter real FMAX_HZ     = 2.5e9
) (
  input  real  vctrl,
  output logic clk_out
);
  real f_hz, half_ps;

  initial clk_out = 1'b0;

  always begin
    f_hz = F0_HZ + KV_HZ_PER_V * vctrl;
    if (f_hz < FMIN_HZ) f_hz = FMIN_HZ;
    if (f_hz > FMAX_HZ) f_hz = FMAX_HZ;
    half_ps = 0.5e12 / f_hz;
    #(half_ps) clk_out = ~clk_out;
  end
endmodule
