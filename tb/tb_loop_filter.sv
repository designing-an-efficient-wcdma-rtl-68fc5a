`timescale 1ps / 1fs
// tb_loop_filter: self-checking testbench for the loop-filter model.
//
// Charge test: 1 mA is injected for 20 ns, then the current is removed.
// Once the filter settles the charge 20 pC is shared by the three
// capacitors, so vctrl must approach 20 pC / (C1 + C2 + C3). The response
// must first overshoot that level (the zero from R1 makes the voltage on
// the small capacitors jump before the charge reaches C1). Ramp test: a
// constant current I gives, after the transient, a slope of I / (C1+C2+C3).
// Throughout both tests, and during a train of random current pulses, the
// charge held by the three capacitors (read from the model's internal node
// voltages) must equal the integral of the injected current at every step.
module tb_loop_filter;
  real icp, v;
  int  checks = 0, failures = 0;
  localparam real CT = 390.0e-12 + 16.0e-12 + 16.0e-12;

  loop_filter dut (.icp_a(icp), .vctrl(v));

  // charge bookkeeping: integrate the current on the model's own time step,
  // sampled just after each step, and compare with the stored charge. A
  // current edge that falls on a step may be seen one step apart by the two,
  // so one step's charge (10 fC at 1 mA) is allowed.
  real q_in = 0.0;
  initial #0.001 forever begin
    #10;
    q_in += icp * 10.0e-12;
    begin
      real q_caps, err;
      q_caps = 390.0e-12 * dut.v1 + 16.0e-12 * dut.v2 + 16.0e-12 * dut.v3;
      err = q_caps - q_in;
      if (err < 0.0) err = -err;
      checks++;
      if (err > 1.5e-14) begin
        failures++;
        if (failures < 10) $display("t=%0t charge %g stored %g", $realtime, q_in, q_caps);
      end
    end
  end

  initial begin
    #(1ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vmax, vexp, v1, v2, slope;
    icp = 0.0;
    #1000;
    icp = 1.0e-3;
    #20000;
    icp = 0.0;
    vmax = 0.0;
    repeat (20000) begin
      #100;
      if (v > vmax) vmax = v;
    end
    vexp = 20.0e-12 / CT;
    checks++;
    if (v < 0.99 * vexp || v > 1.01 * vexp) begin
      failures++;
      $display("settled %f V expected %f V", v, vexp);
    end
    checks++;
    if (vmax < 1.05 * vexp) begin
      failures++;
      $display("no overshoot: max %f final %f", vmax, v);
    end
    // ramp
    icp = -0.5e-3;
    #500000;
    v1 = v;
    #100000;
    v2 = v;
    slope = (v2 - v1) / 100.0e-9;
    checks++;
    if (slope > 0.99 * (-0.5e-3 / CT) || slope < 1.01 * (-0.5e-3 / CT)) begin
      failures++;
      $display("slope %g V/s expected %g", slope, -0.5e-3 / CT);
    end
    // random pulse train, as the PFD produces
    icp = 0.0;
    repeat (200) begin
      #($urandom_range(2000, 200));
      icp = ($urandom_range(1)) ? 1.0e-3 : -1.0e-3;
      #($urandom_range(900, 10));
      icp = 0.0;
    end
    #1000;
    $display("settled %f V (expected %f), peak %f, slope %g V/s", v, vexp, vmax, slope);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
