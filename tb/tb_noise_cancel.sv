`timescale 1ps / 1fs
// tb_noise_cancel: self-checking testbench for the MASH noise-cancellation
// network.
//
// Random 1-bit stage outputs are applied. The expected output is computed
// here in expanded form from a history of the inputs,
//     y = C1[n] + (C2[n]-C2[n-1]) + (C3[n]-2C3[n-1]+C3[n-2])
//           + (C4[n]-3C4[n-1]+3C4[n-2]-C4[n-3])
// and compared with the registered output one clock later. The output range
// -7..+8 is checked, and both extremes are driven on purpose.
module tb_noise_cancel;
  logic              clk = 1'b0;
  logic              rst_n;
  logic [3:0]        c;
  logic signed [4:0] y;
  int                checks = 0, failures = 0;
  int                hist [4][4];   // hist[stage][delay]
  int                expv, seen_min, seen_max;

  noise_cancel dut (.clk(clk), .rst_n(rst_n), .en(1'b1), .c(c), .y(y));

  always #5000 clk = ~clk;

  initial begin
    #(200_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; c = '0;
    foreach (hist[i, j]) hist[i][j] = 0;
    seen_min = 0; seen_max = 0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      // patterns that reach -7 and +8, then random
      if (n >= 10 && n < 14)      c = (n % 2) ? 4'b1111 : 4'b0000;
      else if (n >= 20 && n < 24) c = (n % 2) ? 4'b0000 : 4'b1111;
      else                        c = 4'($urandom);
      for (int s = 0; s < 4; s++) begin
        for (int d = 3; d > 0; d--) hist[s][d] = hist[s][d-1];
        hist[s][0] = c[s];
      end
      expv = hist[0][0]
           + (hist[1][0] - hist[1][1])
           + (hist[2][0] - 2 * hist[2][1] + hist[2][2])
           + (hist[3][0] - 3 * hist[3][1] + 3 * hist[3][2] - hist[3][3]);
      @(negedge clk);
      checks++;
      if (int'(y) != expv) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d expected %0d", n, y, expv);
      end
      if (int'(y) < seen_min) seen_min = int'(y);
      if (int'(y) > seen_max) seen_max = int'(y);
    end
    checks++;
    if (seen_min != -7 || seen_max != 8) begin
      failures++;
      $display("range %0d..%0d, expected -7..8", seen_min, seen_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
