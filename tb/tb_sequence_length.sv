`timescale 1ps / 1fs
// tb_sequence_length: sequence length of the HK-MASH against a classical
// MASH of the same width.
//
// Both modulators are hk_mash4 scaled to 6-bit stages so that periods can be
// measured: one with a = 3 (M - a = 61, prime), one with a = 0, which turns
// every stage into the plain accumulator of the classical MASH 1-1-1-1.
// Dither is off in both, so only the deterministic structure is compared.
// For every input word 1..60 the output is recorded for 24 000 samples and
// the shortest period p <= 4096 with y[n] = y[n+p] over the last 16 000
// samples is searched. The classical MASH must show a short period (at most
// 8*M = 512) for every word; the HK-MASH must show none up to 4096 for any
// word, i.e. its sequences are always longer than 4096 samples.
module tb_sequence_length;
  localparam int N0   = 6;
  localparam int L    = 24000;
  localparam int PMAX = 4096;
  localparam int W0   = L - 16000;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [N0-1:0]     r;
  logic signed [4:0] y_hk, y_cl;
  logic [3:0]        k_hk, k_cl;
  int                checks = 0, failures = 0;
  byte               s_hk [L];
  byte               s_cl [L];

  hk_mash4 #(.N0(N0), .A(3)) dut_hk (.clk(clk), .rst_n(rst_n), .en(1'b1),
      .dither_en(1'b0), .r(r), .y(y_hk), .carry(k_hk));
  hk_mash4 #(.N0(N0), .A(0)) dut_cl (.clk(clk), .rst_n(rst_n), .en(1'b1),
      .dither_en(1'b0), .r(r), .y(y_cl), .carry(k_cl));

  always #5000 clk = ~clk;

  initial begin
    #(100ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int period(ref byte s [L]);
    for (int p = 1; p <= PMAX; p++) begin
      bit ok = 1'b1;
      for (int n = W0; n + p < L; n++)
        if (s[n] != s[n+p]) begin ok = 1'b0; break; end
      if (ok) return p;
    end
    return 0;   // none found
  endfunction

  initial begin
    int p_hk, p_cl, cl_max, hk_short;
    cl_max = 0; hk_short = 0;
    for (int rv = 1; rv <= 60; rv++) begin
      r = N0'(rv);
      rst_n = 1'b1;
      #10 rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      for (int n = 0; n < L; n++) begin
        @(negedge clk);
        s_hk[n] = byte'(y_hk);
        s_cl[n] = byte'(y_cl);
      end
      p_hk = period(s_hk);
      p_cl = period(s_cl);
      checks++;
      if (p_cl == 0 || p_cl > 8 * (1 << N0)) begin
        failures++;
        $display("r=%0d: classical MASH period %0d", rv, p_cl);
      end
      checks++;
      if (p_hk != 0) begin
        failures++;
        hk_short++;
        $display("r=%0d: HK-MASH period only %0d", rv, p_hk);
      end
      if (p_cl > cl_max) cl_max = p_cl;
    end
    $display("classical MASH: longest period %0d samples; HK-MASH: no period up to %0d for any input",
             cl_max, PMAX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
