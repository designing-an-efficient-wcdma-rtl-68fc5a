`timescale 1ps / 1fs
// tb_dither_lfsr: self-checking testbench for the 8-bit dither LFSR.
//
// A reference register here steps by x^8 + x^6 + x^5 + x^4 + 1 written out
// bit by bit; the device is compared with it every clock, including with the
// enable low. The test also checks that the state never becomes zero, that
// it returns to the seed after exactly 255 steps and not before, and that
// all 255 non-zero words occur once per period.
module tb_dither_lfsr;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       en;
  logic [7:0] q;
  int         checks = 0, failures = 0;

  dither_lfsr dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q));

  always #5000 clk = ~clk;

  initial begin
    #(100_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] model;
  int         seen [256];
  int         first_return;

  initial begin
    rst_n = 1'b0; en = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    model = 8'hA5;
    checks++;
    if (q !== model) begin failures++; $display("reset value %h", q); end
    foreach (seen[i]) seen[i] = 0;
    first_return = -1;
    en = 1'b1;
    for (int n = 1; n <= 600; n++) begin
      @(negedge clk);
      model = {model[6:0], model[7] ^ model[5] ^ model[4] ^ model[3]};
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("step %0d: q=%h expected %h", n, q, model);
      end
      checks++;
      if (q == 8'h00) failures++;
      if (n <= 255) seen[q]++;
      if (q == 8'hA5 && first_return < 0) first_return = n;
    end
    checks++;
    if (first_return != 255) begin
      failures++;
      $display("period %0d, expected 255", first_return);
    end
    for (int w = 1; w < 256; w++) begin
      checks++;
      if (seen[w] != 1) failures++;
    end
    // enable low holds the state
    en = 1'b0;
    model = q;
    repeat (5) @(negedge clk);
    checks++;
    if (q !== model) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
