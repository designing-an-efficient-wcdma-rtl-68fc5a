`timescale 1ps / 1fs
// tb_charge_pump: self-checking testbench for the charge-pump model.
//
// Checks the four UP/DN combinations for the matched default pump and for a
// second instance with a 5 % weaker sink current (mismatch).
module tb_charge_pump;
  logic up, dn;
  real  i0, i1;
  int   checks = 0, failures = 0;

  charge_pump dut0 (.up(up), .dn(dn), .icp_a(i0));
  charge_pump #(.ICP_UP_A(1.0e-3), .ICP_DN_A(0.95e-3)) dut1 (.up(up), .dn(dn), .icp_a(i1));

  function automatic bit close(real a, real b);
    return (a - b < 1.0e-12) && (b - a < 1.0e-12);
  endfunction

  initial begin
    #(1ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e0, e1;
    for (int k = 0; k < 4; k++) begin
      {up, dn} = 2'(k);
      #10;
      e0 = (up ? 1.0e-3 : 0.0) - (dn ? 1.0e-3 : 0.0);
      e1 = (up ? 1.0e-3 : 0.0) - (dn ? 0.95e-3 : 0.0);
      checks++;
      if (!close(i0, e0)) begin failures++; $display("up=%0d dn=%0d i=%g", up, dn, i0); end
      checks++;
      if (!close(i1, e1)) begin failures++; $display("mismatch up=%0d dn=%0d i=%g", up, dn, i1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
