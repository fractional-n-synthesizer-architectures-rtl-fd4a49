// tb_dac_sdm: compares the first-order modulator with an integer model of
// w[i] = x[i-1] - y[i-1] + w[i-1], y = floor(w / 2^11) limited to 0..31, for
// a slowly varying random input, and checks that for constant inputs the
// mean output times 2^11 equals the input within 2^11 / 1000.
`timescale 1ns/1fs
module tb_dac_sdm;
  logic clk = 0, rst_n = 0;
  logic [15:0] x;
  logic [4:0]  y;
  int checks = 0, failures = 0;

  dac_sdm dut (.clk, .rst_n, .x, .y);
  always #2.5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint w, my, sum;
    x = 16'd0;
    #3 rst_n = 1;
    w = 0;
    for (int n = 0; n < 30000; n++) begin
      @(negedge clk);
      my = w >>> 11;
      if (my < 0) my = 0;
      if (my > 31) my = 31;
      checks++;
      if (longint'(y) != my) begin
        failures++;
        if (failures < 10) $display("n%0d y=%0d model=%0d", n, y, my);
      end
      if (n % 64 == 0) x = 16'($urandom_range(0, 63000));
      w = w + longint'(x) - (my << 11);
    end
    for (int t = 0; t < 4; t++) begin
      x = 16'($urandom_range(1000, 62000));
      repeat (10) @(negedge clk);
      sum = 0;
      for (int n = 0; n < 4096; n++) begin @(negedge clk); sum += longint'(y); end
      checks++;
      if ((sum * 2048) / 4096 - longint'(x) > 3 || longint'(x) - (sum * 2048) / 4096 > 3) begin
        failures++; $display("mean %0d vs %0d", (sum * 2048) / 4096, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
