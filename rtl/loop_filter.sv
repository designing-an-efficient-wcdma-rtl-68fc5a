`timescale 1ps / 1fs
// loop_filter: behavioural model of the passive third-order loop filter
// (analog part, not synthesizable logic).
//
// The charge-pump current flows into node v2. From v2 to ground are C2 and
// the series pair R1-C1 (the integrating capacitor C1 and the zero-setting
// resistor R1); R2 and C3 then form the extra pole, and the voltage across
// C3 is the VCO control voltage. The model integrates the three capacitor
// voltages with forward Euler steps of STEP_PS picoseconds:
//     C1 dv1/dt = (v2 - v1)/R1
//     C2 dv2/dt = i_cp - (v2 - v1)/R1 - (v2 - v3)/R2
//     C3 dv3/dt = (v2 - v3)/R2
// All capacitors start at V_INIT volts.
//
// Interface and timing: icp_a (real, amperes into the filter), vctrl (real,
// volts), updated every STEP_PS. The charge-pump current is sampled at each
// step, so a pulse is resolved to STEP_PS.
//
// From the published design: a type-II, third-order passive filter. This
// design's choice: the component values. They give, with a 1 mA charge
// pump, a 50 MHz/V VCO and N = 98.25, an open-loop unity-gain frequency of
// about 0.9 MHz and about 54 degrees of phase margin, close to the 1 MHz
// loop bandwidth and 56 degree margin targeted for the synthesizer. They
// are placed by the usual phase-margin rule (zero and pole symmetric about
// the crossover), not tuned for a Butterworth closed-loop response.
module loop_filter #(
  parameter real C1_F    = 390.0e-12,
  parameter real C2_F    = 16.0e-12,
  parameter real R1_OHM  = 2050.0,
  parameter real R2_OHM  = 1000.0,
  parameter real C3_F    = 16.0e-12,
  parameter real STEP_PS = 10.0,
  parameter real V_INIT  = 0.0
) (
  input  real icp_a,
  output real vctrl
);
  real v1, v2, v3;
  real i_r1, i_r2, dt;

  initial begin
    v1    = V_INIT;
    v2    = V_INIT;
    v3    = V_INIT;
    vctrl = V_INIT;
    dt    = STEP_PS * 1.0e-12;
  end

  always begin
    #(STEP_PS);
    i_r1  = (v2 - v1) / R1_OHM;
    i_r2  = (v2 - v3) / R2_OHM;
    v1    = v1 + dt * i_r1 / C1_F;
    v2    = v2 + dt * (icp_a - i_r1 - i_r2) / C2_F;
    v3    = v3 + dt * i_r2 / C3_F;
    vctrl = v3;
  end
endmodule
