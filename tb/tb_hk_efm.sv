`timescale 1ps / 1fs
// tb_hk_efm: self-checking testbench for one HK error-feedback stage.
//
// Two instances: a 6-bit stage (M = 64, a = 3, M - a = 61 is prime) and the
// full 20-bit stage (a = 3). Every output is compared each clock with a
// reference computed here from the defining equations. For the 6-bit stage
// and several constant inputs r it also checks the two properties that make
// the stage useful: over one period of M - a samples the number of ones is
// exactly r (mean r/(M-a)), and the output sequence repeats with period
// M - a and no shorter period dividing it.
module tb_hk_efm;
  localparam int N_S = 6;
  localparam int M_S = 1 << N_S;
  localparam int A_S = 3;
  localparam int P_S = M_S - A_S;     // 61, prime

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  // small instance
  logic [N_S-1:0] r_s;
  logic           c_s;
  logic [N_S-1:0] e_s;
  hk_efm #(.N0(N_S), .A(A_S), .DW(2)) dut_s (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .r(r_s), .d(2'd0), .c(c_s), .e(e_s));

  // full-size instance, with a random dither input
  logic [19:0] r_f;
  logic [7:0]  d_f;
  logic        c_f;
  logic [19:0] e_f;
  hk_efm dut_f (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .r(r_f), .d(d_f), .c(c_f), .e(e_f));

  always #5000 clk = ~clk;

  initial begin
    #(2ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  longint ref_e_s, ref_c_s, ref_e_f, ref_c_f;
  bit     seq [2*P_S];

  task automatic step_ref_small(output bit cc);
    longint u;
    u  = longint'(r_s) + ref_e_s + A_S * ref_c_s;
    cc = (u >= M_S);
    ref_c_s = cc;
    ref_e_s = u - M_S * cc;
  endtask

  initial begin
    int ones;
    bit cc;
    rst_n = 1'b0;
    r_s = '0; r_f = '0; d_f = '0;
    ref_e_s = 0; ref_c_s = 0; ref_e_f = 0; ref_c_f = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // small stage: a set of constant inputs, each run for 3 periods after reset
    foreach (seq[i]) seq[i] = 1'b0;
    for (int rv = 1; rv < P_S; rv += 7) begin
      rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
      ref_e_s = 0; ref_c_s = 0;
      r_s = N_S'(rv);
      // transient period, then two periods recorded
      for (int n = 0; n < 3 * P_S; n++) begin
        #1;
        step_ref_small(cc);
        checks++;
        if (c_s !== cc || longint'(e_s) != ref_e_s) begin
          failures++;
          if (failures < 10) $display("small r=%0d n=%0d: c=%0d/%0d e=%0d/%0d",
                                      rv, n, c_s, cc, e_s, ref_e_s);
        end
        if (n >= P_S) seq[n - P_S] = c_s;
        @(negedge clk);
      end
      ones = 0;
      for (int i = 0; i < P_S; i++) ones += seq[i];
      checks++;
      if (ones != rv) begin
        failures++;
        $display("r=%0d: %0d ones in one period of %0d, expected %0d", rv, ones, P_S, rv);
      end
      // period P_S: second period equals the first
      for (int i = 0; i < P_S; i++) begin
        checks++;
        if (seq[i] != seq[i + P_S]) begin failures++; break; end
      end
      // no shorter period (P_S is prime, so only period 1 can divide it)
      checks++;
      begin
        bit same = 1'b1;
        for (int i = 1; i < P_S; i++) if (seq[i] != seq[0]) same = 1'b0;
        if (same) begin failures++; $display("r=%0d: constant output", rv); end
      end
    end

    // full-size stage: random inputs below M - a and random dither words
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    ref_e_f = 0; ref_c_f = 0;
    for (int n = 0; n < 20000; n++) begin
      longint u;
      r_f = 20'($urandom_range((1 << 20) - 300));
      d_f = 8'($urandom);
      #1;
      u = longint'(r_f) + longint'(d_f) + ref_e_f + 3 * ref_c_f;
      cc = (u >= (1 << 20));
      checks++;
      if (c_f !== cc || longint'(e_f) != (u - (cc ? (1 << 20) : 0))) begin
        failures++;
        if (failures < 10) $display("full n=%0d: c=%0d/%0d e=%0d", n, c_f, cc, e_f);
      end
      ref_c_f = cc;
      ref_e_f = u - (cc ? (1 << 20) : 0);
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
