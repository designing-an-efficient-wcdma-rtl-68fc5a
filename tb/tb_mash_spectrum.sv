`timescale 1ps / 1fs
// tb_mash_spectrum: noise-shaping test of the 4th-order modulator at the
// operating point used for its output spectrum: 20-bit constant input
// 917504 (0.875 of full scale), dither on, 2**19 samples.
//
// After the run the testbench takes the discrete Fourier transform of the
// output (mean removed, Hann window, whose sidelobes fall fast enough not
// to hide an 80 dB/decade floor) at 16 bins near f = 0.003 fs and 16 bins ten times
// higher, and compares the mean power of the two groups. A 4th-order shaped
// noise floor rises by 80 dB per decade; the expected ratio is computed from
// |1 - z^-1|^8 = (2 sin(pi f))^8 at the same bins, and the measured ratio
// must agree within 6 dB. It also checks that the low band is more than
// 120 dB below the band at 0.25 fs, i.e. that the noise is pushed out of the
// low-frequency (in-loop) band.
module tb_mash_spectrum;
  localparam int NS = 1 << 19;
  localparam real PI = 3.14159265358979323846;

  logic              clk = 1'b0;
  logic              rst_n;
  logic signed [4:0] y;
  logic [3:0]        carry;
  int                checks = 0, failures = 0;
  byte               samp [NS];
  real               hann [NS];

  hk_mash4 dut (.clk(clk), .rst_n(rst_n), .en(1'b1), .dither_en(1'b1),
                .r(20'd917504), .y(y), .carry(carry));

  always #5000 clk = ~clk;

  initial begin
    #(50ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // power of DFT bin k of the mean-removed sequence, normalised by NS
  function automatic real bin_power(int k, real mean);
    real cr, ci, wr, wi, xr, xi, t, ph;
    xr = 0.0; xi = 0.0;
    ph = 2.0 * PI * real'(k) / real'(NS);
    wr = $cos(ph); wi = -$sin(ph);
    for (int n = 0; n < NS; n++) begin
      if ((n & 1023) == 0) begin   // re-anchor the rotating phasor
        cr = $cos(ph * real'(n));
        ci = -$sin(ph * real'(n));
      end
      xr += (real'(samp[n]) - mean) * hann[n] * cr;
      xi += (real'(samp[n]) - mean) * hann[n] * ci;
      t  = cr * wr - ci * wi;
      ci = cr * wi + ci * wr;
      cr = t;
    end
    return (xr * xr + xi * xi) / real'(NS);
  endfunction

  function automatic real ntf8(int k);
    real s;
    s = 2.0 * $sin(PI * real'(k) / real'(NS));
    return s * s * s * s * s * s * s * s;
  endfunction

  initial begin
    real    mean, p_lo, p_hi, p_q, t_lo, t_hi, meas_db, theo_db, q_db;
    longint sum;
    rst_n = 1'b1;
    #10 rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    sum = 0;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      samp[n] = byte'(y);
      sum += longint'(y);
    end
    mean = real'(sum) / real'(NS);
    for (int n = 0; n < NS; n++) hann[n] = 0.5 - 0.5 * $cos(2.0 * PI * real'(n) / real'(NS));
    p_lo = 0.0; p_hi = 0.0; t_lo = 0.0; t_hi = 0.0; p_q = 0.0;
    for (int i = 0; i < 16; i++) begin
      int kl, kh;
      kl = 1400 + 37 * i;
      kh = 10 * kl;
      p_lo += bin_power(kl, mean);
      p_hi += bin_power(kh, mean);
      p_q  += bin_power(NS / 4 + 37 * i, mean);
      t_lo += ntf8(kl);
      t_hi += ntf8(kh);
    end
    meas_db = 10.0 * $log10(p_hi / p_lo);
    theo_db = 10.0 * $log10(t_hi / t_lo);
    q_db    = 10.0 * $log10(p_q / p_lo);
    $display("mean %f; rise over one decade: %f dB (4th-order shaping %f dB); 0.25 fs band %f dB above low band",
             mean, meas_db, theo_db, q_db);
    checks++;
    if (meas_db < theo_db - 6.0 || meas_db > theo_db + 6.0) begin
      failures++;
      $display("noise slope does not match 4th-order shaping");
    end
    checks++;
    if (q_db < 120.0) begin
      failures++;
      $display("low band not suppressed");
    end
    checks++;
    if (mean < 0.8749 || mean > 0.8751) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
