`timescale 1ps / 1fs
// fracn_synth_top: delta-sigma fractional-N PLL frequency synthesizer.
//
// The loop is the classic charge-pump PLL: a tri-state phase-frequency
// detector compares the reference with the divided VCO output, the charge
// pump and a third-order passive loop filter turn the phase error into the
// VCO control voltage, and a multi-modulus divider closes the loop. The
// divider ratio is N + c[n], where c[n] comes from a 4th-order HK-MASH
// delta-sigma modulator clocked by the divider output. The modulator's
// mean output equals the fractional word frac/2**20 (to 3 parts in 2**20),
// so the locked output frequency is
//     f_out = f_ref * (N + frac / (2**20 - 3))
// and the modulator pushes the quantization noise of that fractional
// division to high offset frequencies where the loop filter removes it.
// With f_ref = 20 MHz, N = 98 and frac = 2**18 the output is 1.965 GHz.
//
// Interface: ref_clk is the reference (the reference oscillator itself is
// outside this design); n_int and frac set the division; dither_en enables
// the LFSR dither of the modulator. Outputs: the VCO clock f_out, the
// divider output div_clk, the PFD outputs, the modulator output c_out, the
// current divider ratio and the control voltage (real, volts).
// rst_n (active low, asynchronous) resets the digital blocks; the VCO and
// filter start from their initial state at time 0.
//
// The PFD, divider and modulator are synthesizable; the charge pump, loop
// filter and VCO are behavioural models, so this top is for simulation.
//
// From the published design: the loop structure, the modulator clocked by
// the divider output, the 20 MHz reference and the 1.965 GHz target. This
// design's choices: the analog values (1 mA, 50 MHz/V, filter components
// for a loop near 1 MHz), the port widths and the observation outputs
// (c_out, ratio, mash_carry, vctrl).
module fracn_synth_top
  import fracn_pkg::*;
#(
  parameter int unsigned N0  = N0_DEF,
  parameter int unsigned NW  = NINT_W,
  parameter int unsigned RW  = RATIO_W,
  parameter int unsigned CW  = MASH_W
) (
  input  logic                 ref_clk,
  input  logic                 rst_n,
  input  logic [NW-1:0]        n_int,
  input  logic [N0-1:0]        frac,
  input  logic                 dither_en,
  output logic                 f_out,
  output logic                 div_clk,
  output logic                 up,
  output logic                 dn,
  output logic signed [CW-1:0] c_out,
  output logic [RW-1:0]        ratio,
  output logic [ORDER_DEF-1:0] mash_carry,
  output real                  vctrl
);
  real icp_a;

  pfd_tristate u_pfd (
    .ref_clk(ref_clk),
    .fb_clk (div_clk),
    .rst_n  (rst_n),
    .up     (up),
    .dn     (dn)
  );

  charge_pump u_cp (
    .up   (up),
    .dn   (dn),
    .icp_a(icp_a)
  );

  loop_filter u_lf (
    .icp_a(icp_a),
    .vctrl(vctrl)
  );

  vco u_vco (
    .vctrl  (vctrl),
    .clk_out(f_out)
  );

  mm_divider #(.NW(NW), .CW(CW), .RW(RW)) u_div (
    .clk    (f_out),
    .rst_n  (rst_n),
    .n_int  (n_int),
    .c      (c_out),
    .div_out(div_clk),
    .ratio_q(ratio)
  );

  hk_mash4 #(.N0(N0), .ORDER(ORDER_DEF), .OW(CW)) u_dsm (
    .clk      (div_clk),
    .rst_n    (rst_n),
    .en       (1'b1),
    .dither_en(dither_en),
    .r        (frac),
    .y        (c_out),
    .carry    (mash_carry)
  );
endmodule
