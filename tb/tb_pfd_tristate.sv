`timescale 1ps / 1fs
// tb_pfd_tristate: self-checking testbench for the tri-state PFD.
//
// Phase test: both inputs at 20 MHz, the feedback edge delayed from the
// reference edge by a set offset. UP must be high for exactly that offset
// when the reference leads, DN when it lags, and the two must never be
// high together at a sampling point. Frequency test: with the reference
// faster than the feedback, UP must be high for more time than DN, and the
// other way round.
module tb_pfd_tristate;
  logic ref_clk = 1'b0, fb_clk = 1'b0, rst_n;
  logic up, dn;
  int   checks = 0, failures = 0;

  pfd_tristate dut (.ref_clk(ref_clk), .fb_clk(fb_clk), .rst_n(rst_n), .up(up), .dn(dn));

  initial begin
    #(10ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure high time of up and dn
  // (state-based, so a zero-width pulse adds nothing)
  realtime up_time = 0.0, dn_time = 0.0, t_last = 0.0;
  logic    prev_up = 1'b0, prev_dn = 1'b0;
  always @(up, dn) begin
    if (prev_up) up_time += $realtime - t_last;
    if (prev_dn) dn_time += $realtime - t_last;
    prev_up = up;
    prev_dn = dn;
    t_last  = $realtime;
  end

  task automatic phase_test(input int offset_ps);
    // offset > 0: reference leads
    up_time = 0; dn_time = 0;
    for (int k = 0; k < 10; k++) begin
      if (offset_ps >= 0) begin
        ref_clk = 1'b1; #(offset_ps); fb_clk = 1'b1;
        #(25000 - offset_ps); ref_clk = 1'b0; #(offset_ps); fb_clk = 1'b0;
        #(25000 - offset_ps);
      end else begin
        fb_clk = 1'b1; #(-offset_ps); ref_clk = 1'b1;
        #(25000 + offset_ps); fb_clk = 1'b0; #(-offset_ps); ref_clk = 1'b0;
        #(25000 + offset_ps);
      end
    end
    checks++;
    if (offset_ps >= 0 && (up_time != 10.0 * offset_ps || dn_time != 0.0)) begin
      failures++;
      $display("offset %0d: up %f dn %f", offset_ps, up_time, dn_time);
    end
    checks++;
    if (offset_ps < 0 && (dn_time != -10.0 * offset_ps || up_time != 0.0)) begin
      failures++;
      $display("offset %0d: up %f dn %f", offset_ps, up_time, dn_time);
    end
  endtask

  // never both high at a sampling point away from the edges
  always #777 begin
    if (rst_n) begin
      checks++;
      if (up && dn) failures++;
    end
  end

  initial begin
    // give the asynchronous clear a real edge whatever the power-up state
    rst_n = 1'b1;
    #10;
    rst_n = 1'b0;
    // and clock both inputs once during reset, which clears the flip-flops
    // even when the clear was already high at time zero
    #20 ref_clk = 1'b1; fb_clk = 1'b1;
    #20 ref_clk = 1'b0; fb_clk = 1'b0;
    #60;
    rst_n = 1'b1;
    #100;
    up_time = 0.0; dn_time = 0.0;
    phase_test(3000);
    phase_test(12000);
    phase_test(-5000);
    phase_test(-500);
    phase_test(1);
    // frequency test: reference 20 MHz, feedback 18 MHz
    up_time = 0; dn_time = 0;
    fork
      repeat (40) begin ref_clk = 1; #25000; ref_clk = 0; #25000; end
      repeat (36) begin fb_clk = 1;  #27778; fb_clk = 0;  #27778; end
    join
    checks++;
    if (!(up_time > 4.0 * dn_time)) begin
      failures++; $display("fast ref: up %f dn %f", up_time, dn_time);
    end
    up_time = 0; dn_time = 0;
    fork
      repeat (36) begin ref_clk = 1; #27778; ref_clk = 0; #27778; end
      repeat (40) begin fb_clk = 1;  #25000; fb_clk = 0;  #25000; end
    join
    checks++;
    if (!(dn_time > 4.0 * up_time)) begin
      failures++; $display("slow ref: up %f dn %f", up_time, dn_time);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
