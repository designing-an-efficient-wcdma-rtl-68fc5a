`timescale 1ps / 1fs
// tb_fracn_synth_top: end-to-end test of the fractional-N synthesizer, with
// every parameter at its default.
//
// A 20 MHz reference drives the loop. Phase 1 asks for N = 98,
// frac = 2**18 (98.25, 1.965 GHz) with dither on, starting from the VCO's
// free-running 1.94 GHz. Phase 2 switches channel to N = 97,
// frac = 917504 (97.875, 1.9575 GHz) and turns the dither off.
// The output frequency is measured by counting VCO edges in every 1 us
// window (20 reference periods). The loop counts as locked once every later
// window holds the expected count within +-2 edges (0.1 %); the lock time
// must be below 25 us in both phases. Once locked, the VCO edges over 40
// reference periods must equal 40 * (N + frac/(2**20-3)) within +-8, which
// is only true with the phase, not just the frequency, locked; the mean
// divider ratio over the same span must agree to 0.2 %, and the control
// voltage must sit near (f_out - 1.94 GHz) / 50 MHz/V.
// Every mechanism of the loop must occur and is counted: UP and DN pulses,
// divider ratios below and above N and at least 8 distinct ratios (the
// modulator's multi-level output), a carry from each of the four stages,
// dither on and off, and the channel switch with re-lock.
module tb_fracn_synth_top;
  logic              ref_clk = 1'b0;
  logic              rst_n;
  logic [7:0]        n_int;
  logic [19:0]       frac;
  logic              dither_en;
  logic              f_out, div_clk, up, dn;
  logic signed [4:0] c_out;
  logic [7:0]        ratio;
  logic [3:0]        mash_carry;
  real               vctrl;
  int                checks = 0, failures = 0;

  fracn_synth_top dut (
    .ref_clk(ref_clk), .rst_n(rst_n), .n_int(n_int), .frac(frac),
    .dither_en(dither_en), .f_out(f_out), .div_clk(div_clk), .up(up), .dn(dn),
    .c_out(c_out), .ratio(ratio), .mash_carry(mash_carry), .vctrl(vctrl));

  always #25000 ref_clk = ~ref_clk;   // 20 MHz

  initial begin
    #(200us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  longint vco_edges = 0;
  int     up_pulses = 0, dn_pulses = 0;
  int     ratio_lo = 0, ratio_hi = 0;
  int     carry_seen [4] = '{0, 0, 0, 0};
  bit     ratio_seen [256];
  longint ratio_sum = 0, div_edges = 0;
  int     dither_on_cycles = 0, dither_off_cycles = 0;

  always @(posedge f_out) vco_edges++;
  always @(posedge up) up_pulses++;
  always @(posedge dn) dn_pulses++;
  always @(posedge div_clk) begin
    #1;
    if (rst_n) begin
      ratio_seen[ratio] = 1'b1;
      ratio_sum += longint'(ratio);
      div_edges++;
      if (ratio < n_int) ratio_lo++;
      if (ratio > n_int) ratio_hi++;
      for (int k = 0; k < 4; k++) if (mash_carry[k]) carry_seen[k]++;
      if (dither_en) dither_on_cycles++; else dither_off_cycles++;
    end
  end

  // run one channel; returns lock time in us
  task automatic channel(input int n, input int fr, input bit dith,
                         input real f_exp_hz, output int lock_us);
    longint start, cnt, rs0, de0;
    real    per_us, n_exp, v_exp, mean_ratio;
    int     last_bad;
    n_int = 8'(n); frac = 20'(fr); dither_en = dith;
    per_us   = f_exp_hz * 1.0e-6;
    last_bad = 0;
    // 40 windows of 1 us
    for (int w = 1; w <= 40; w++) begin
      start = vco_edges;
      repeat (20) @(posedge ref_clk);
      cnt = vco_edges - start;
      if (real'(cnt) < per_us - 2.0 || real'(cnt) > per_us + 2.0) last_bad = w;
    end
    lock_us = last_bad;
    checks++;
    if (lock_us >= 25) begin
      failures++;
      $display("N=%0d frac=%0d: not locked within 25 us (last bad window %0d us)", n, fr, lock_us);
    end
    // phase lock: 40 reference periods
    n_exp = real'(n) + real'(fr) / real'((1 << 20) - 3);
    start = vco_edges; rs0 = ratio_sum; de0 = div_edges;
    repeat (40) @(posedge ref_clk);
    cnt = vco_edges - start;
    mean_ratio = real'(ratio_sum - rs0) / real'(div_edges - de0);
    checks++;
    if (real'(cnt) < 40.0 * n_exp - 8.0 || real'(cnt) > 40.0 * n_exp + 8.0) begin
      failures++;
      $display("N=%0d frac=%0d: %0d VCO edges in 40 ref periods, expected %f", n, fr, cnt, 40.0 * n_exp);
    end
    checks++;
    if (mean_ratio < n_exp * 0.998 || mean_ratio > n_exp * 1.002) begin
      failures++;
      $display("mean divider ratio %f expected %f", mean_ratio, n_exp);
    end
    v_exp = (f_exp_hz - 1.94e9) / 50.0e6;
    checks++;
    if (vctrl < v_exp - 0.03 || vctrl > v_exp + 0.03) begin
      failures++;
      $display("vctrl %f expected about %f", vctrl, v_exp);
    end
    $display("N=%0d frac=%0d dither=%0d: lock after %0d us, %0d VCO edges / 40 ref (exp %f), mean ratio %f, vctrl %f V",
             n, fr, dith, lock_us, cnt, 40.0 * n_exp, mean_ratio, vctrl);
  endtask

  initial begin
    int lk1, lk2;
    n_int = 8'd98; frac = 20'd262144; dither_en = 1'b1;
    rst_n = 1'b1;
    #10 rst_n = 1'b0;
    repeat (2) @(posedge ref_clk);
    @(negedge ref_clk);
    rst_n = 1'b1;
    channel(98, 262144, 1'b1, 20.0e6 * (98.0 + 262144.0 / 1048573.0), lk1);
    channel(97, 917504, 1'b0, 20.0e6 * (97.0 + 917504.0 / 1048573.0), lk2);

    // every mechanism must have happened
    checks++; if (up_pulses == 0) begin failures++; $display("no UP pulse"); end
    checks++; if (dn_pulses == 0) begin failures++; $display("no DN pulse"); end
    checks++; if (ratio_lo == 0 || ratio_hi == 0) begin failures++; $display("ratio never below/above N"); end
    begin
      int distinct = 0;
      foreach (ratio_seen[i]) distinct += int'(ratio_seen[i]);
      checks++;
      if (distinct < 8) begin failures++; $display("only %0d distinct ratios", distinct); end
      $display("UP pulses %0d, DN pulses %0d, ratios below N %0d, above N %0d, distinct %0d",
               up_pulses, dn_pulses, ratio_lo, ratio_hi, distinct);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (carry_seen[k] == 0) begin failures++; $display("stage %0d never overflowed", k + 1); end
    end
    $display("stage carries %0d %0d %0d %0d; dither on %0d / off %0d modulator samples; lock %0d us / %0d us",
             carry_seen[0], carry_seen[1], carry_seen[2], carry_seen[3],
             dither_on_cycles, dither_off_cycles, lk1, lk2);
    checks++; if (dither_on_cycles == 0 || dither_off_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
