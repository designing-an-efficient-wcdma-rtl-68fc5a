`timescale 1ps / 1fs
// tb_vco: self-checking testbench for the VCO model.
//
// For several control voltages the testbench counts output edges over
// 2 us and compares the frequency with F0 + Kv*vctrl (1.94 GHz + 50 MHz/V),
// within 0.01 %. It also checks the upper clamp at 2.5 GHz and the 50 %
// duty cycle at 1.965 GHz (vctrl = 0.5 V).
module tb_vco;
  real  vc;
  logic clk;
  int   checks = 0, failures = 0;
  int   edges;

  vco dut (.vctrl(vc), .clk_out(clk));

  always @(posedge clk) edges++;

  initial begin
    #(1ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input real v, input real f_exp);
    real f;
    vc = v;
    #10000;
    edges = 0;
    #2000000;
    f = real'(edges) / 2.0e-6;
    checks++;
    if (f < f_exp * 0.9999 - 1.0e6 || f > f_exp * 1.0001 + 1.0e6) begin
      failures++;
      $display("vctrl %f: %f Hz expected %f Hz", v, f, f_exp);
    end
  endtask

  initial begin
    realtime t_r, t_f;
    edges = 0;
    vc = 0.0;
    measure(0.0, 1.94e9);
    measure(0.5, 1.965e9);
    measure(1.0, 1.99e9);
    measure(-2.0, 1.84e9);
    measure(20.0, 2.5e9);
    // duty cycle at 0.5 V
    vc = 0.5;
    #10000;
    @(posedge clk); t_r = $realtime;
    @(negedge clk); t_f = $realtime;
    checks++;
    if ((t_f - t_r) < 254.0 || (t_f - t_r) > 255.0) begin
      failures++;
      $display("high time %f ps", t_f - t_r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
