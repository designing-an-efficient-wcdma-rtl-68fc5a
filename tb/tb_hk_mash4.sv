`timescale 1ps / 1fs
// tb_hk_mash4: self-checking testbench for the 4th-order HK-MASH modulator.
//
// A reference model written here from the modulator equations (four HK
// error-feedback stages with a = 3, the last one taking the LFSR dither
// word, and the cancellation network in expanded binomial form) is compared
// with the registered output every sample. Runs:
//   * r = 917504 (0.875 of full scale) for 2**19 samples, dither on: the
//     operating point used to show the output spectrum;
//   * r = 262144 (0.25, the 1.965 GHz channel) with dither off, then on;
//   * a few random words.
// For each run the mean of the output must match r/(2**20 - 3) within a
// bounded total error (the running sum of c[n] minus n*r/(M-a) stays within
// +-16), the output must stay in -7..+8, and the dithered and undithered
// sequences for the same word must differ while having the same mean.
// The output latency of one sample is checked by the cycle-by-cycle match.
module tb_hk_mash4;
  localparam longint M = 64'd1 << 20;
  localparam longint A = 3;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              dither_en;
  logic [19:0]       r;
  logic signed [4:0] y;
  logic [3:0]        carry;
  int                checks = 0, failures = 0;

  hk_mash4 dut (.clk(clk), .rst_n(rst_n), .en(1'b1), .dither_en(dither_en),
                .r(r), .y(y), .carry(carry));

  always #5000 clk = ~clk;

  initial begin
    #(20ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  longint     me [4];
  int         mc [4];
  int         hc [4][4];
  logic [7:0] lfsr;

  function automatic int model_step(longint rin, bit dith);
    longint x, u;
    int     yv;
    x = rin;
    for (int s = 0; s < 4; s++) begin
      u = x + me[s] + A * mc[s] + ((s == 3 && dith) ? longint'(lfsr) : 0);
      mc[s] = (u >= M) ? 1 : 0;
      me[s] = u - M * mc[s];
      x = me[s];
      for (int d = 3; d > 0; d--) hc[s][d] = hc[s][d-1];
      hc[s][0] = mc[s];
    end
    lfsr = {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
    yv = hc[0][0] + (hc[1][0] - hc[1][1])
       + (hc[2][0] - 2 * hc[2][1] + hc[2][2])
       + (hc[3][0] - 3 * hc[3][1] + 3 * hc[3][2] - hc[3][3]);
    return yv;
  endfunction

  task automatic model_reset();
    for (int s = 0; s < 4; s++) begin
      me[s] = 0; mc[s] = 0;
      for (int d = 0; d < 4; d++) hc[s][d] = 0;
    end
    lfsr = 8'hA5;
  endtask

  // one run; returns a signature of the output sequence
  task automatic run(input longint rv, input bit dith, input int n_samp,
                     output longint sig);
    longint sum;
    real    drift, max_drift;
    int     ymin, ymax, ev;
    rst_n = 1'b0; dither_en = dith; r = 20'(rv);
    model_reset();
    @(negedge clk);
    rst_n = 1'b1;
    sum = 0; max_drift = 0.0; ymin = 0; ymax = 0; sig = 0;
    for (int n = 0; n < n_samp; n++) begin
      ev = model_step(rv, dith);
      @(negedge clk);
      checks++;
      if (int'(y) != ev) begin
        failures++;
        if (failures < 10) $display("r=%0d dith=%0d n=%0d: y=%0d expected %0d",
                                    rv, dith, n, y, ev);
      end
      sum += longint'(y);
      sig = sig * 31 + longint'(y) + 8;
      drift = real'(sum) - real'(n + 1) * real'(rv) / real'(M - A);
      if (drift < 0) drift = -drift;
      if (drift > max_drift) max_drift = drift;
      if (int'(y) < ymin) ymin = int'(y);
      if (int'(y) > ymax) ymax = int'(y);
    end
    checks++;
    if (max_drift > 16.0) begin
      failures++;
      $display("r=%0d dith=%0d: running-sum drift %f", rv, dith, max_drift);
    end
    checks++;
    if (ymin < -7 || ymax > 8) begin
      failures++;
      $display("r=%0d: output range %0d..%0d", rv, ymin, ymax);
    end
    $display("r=%0d dither=%0d samples=%0d mean=%f (r/(M-a)=%f) range %0d..%0d drift %f",
             rv, dith, n_samp, real'(sum) / real'(n_samp), real'(rv) / real'(M - A),
             ymin, ymax, max_drift);
  endtask

  initial begin
    longint s0, s1;
    rst_n = 1'b0; dither_en = 1'b0; r = '0;
    run(917504, 1'b1, 1 << 19, s0);
    run(262144, 1'b0, 20000, s0);
    run(262144, 1'b1, 20000, s1);
    checks++;
    if (s0 == s1) begin failures++; $display("dither did not change the sequence"); end
    for (int i = 0; i < 4; i++) run(longint'($urandom_range(1048000, 1)), 1'b1, 10000, s0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
