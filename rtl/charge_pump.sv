`timescale 1ps / 1fs
// charge_pump: behavioural model of the charge pump (analog part, not
// synthesizable logic).
//
// Sources ICP_UP_A into the loop filter while UP is high and sinks
// ICP_DN_A while DN is high; with both high the difference flows (a mismatch
// between the two currents shows up then). The output is a real-valued
// current in amperes, positive into the filter.
//
// Interface and timing: up, dn (logic), icp_a (real). The current follows
// the inputs with no delay.
//
// From the published design: a charge pump of current Icp between the PFD and
// the loop filter, with up/down mismatch as a non-ideality. This design's
// choice: the value 1 mA, chosen with the loop filter for a 1 MHz loop.
module charge_pump #(
  parameter real ICP_UP_A = 1.0e-3,
  parameter real ICP_DN_A = 1.0e-3
) (
  input  logic up,
  input  logic dn,
  output real  icp_a
);
  always_comb icp_a = (up ? ICP_UP_A : 0.0) - (dn ? ICP_DN_A : 0.0);
endmodule
