`timescale 1ps / 1fs
// tb_mm_divider: self-checking testbench for the multi-modulus divider.
//
// The input clock runs at 2 GHz. After every output pulse the testbench
// picks a new random modulator value c in -7..+8 (the full range of the
// 4th-order MASH) and applies it half a clock later. It records the ratio
// n_int + c present at each output edge and checks that the next output
// edge comes exactly that many input clocks later, that the output pulse is
// one input clock wide, and that ratio_q reports the ratio in use. n_int is
// 98 and then 97.
module tb_mm_divider;
  logic              clk = 1'b0;
  logic              rst_n;
  logic [7:0]        n_int;
  logic signed [4:0] c;
  logic              div_out;
  logic [7:0]        ratio_q;
  int                checks = 0, failures = 0;

  mm_divider dut (.clk(clk), .rst_n(rst_n), .n_int(n_int), .c(c),
                  .div_out(div_out), .ratio_q(ratio_q));

  always #250 clk = ~clk;

  initial begin
    #(5ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    longint last_edge, expect_len;
    int     pulses, width;
    rst_n = 1'b0; n_int = 8'd98; c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(posedge div_out);
    last_edge  = cyc;
    expect_len = 98;
    pulses = 0;
    while (pulses < 4000) begin
      @(negedge clk);
      // pulse must be one input clock wide
      checks++;
      if (div_out !== 1'b1) failures++;
      if (pulses == 2000) n_int = 8'd97;
      c = 5'($signed($urandom_range(15)) - 7);
      @(negedge clk);
      checks++;
      if (div_out !== 1'b0) failures++;
      width = 0;
      // the ratio for the next period is sampled at the next output edge
      @(posedge div_out);
      checks++;
      if (cyc - last_edge != expect_len) begin
        failures++;
        if (failures < 10) $display("period %0d cycles, expected %0d", cyc - last_edge, expect_len);
      end
      last_edge  = cyc;
      expect_len = longint'(n_int) + longint'(c);
      #1;
      checks++;
      if (longint'(ratio_q) != expect_len) failures++;
      pulses++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
