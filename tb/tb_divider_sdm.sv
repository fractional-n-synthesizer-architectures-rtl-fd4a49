// tb_divider_sdm: compares the second-order modulator cycle by cycle with a
// reference written with 64-bit integers, and checks that the mean output over
// a long run equals the input (within 1/200 of an LSB of the 3-bit output),
// for the nominal ratio word and random constant inputs. It also checks that
// the output is noise-shaped: the running sum of (y - x) stays bounded.
`timescale 1ns/1fs
module tb_divider_sdm;
  import fnpll_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [19:0] x;
  logic [2:0]  y;
  int checks = 0, failures = 0;

  divider_sdm dut (.clk, .rst_n, .x, .y);
  always #2.5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m1, m2, my, one;
  function automatic longint q_ref(longint v);
    longint r;
    r = (v + (64'sd1 <<< 16)) >>> 17;
    if (r < 0) r = 0;
    if (r > 7) r = 7;
    return r;
  endfunction

  initial begin
    longint sum_y, err_acc, max_err;
    real mean;
    one = 64'sd1 <<< 17;
    for (int t = 0; t < 6; t++) begin
      rst_n = 0;
      x = (t == 0) ? RATIO_NOM : 20'($urandom_range(1 << 17, 6 << 17));
      m1 = 0; m2 = 0;
      @(negedge clk);
      rst_n = 1;
      sum_y = 0; err_acc = 0; max_err = 0;
      for (int n = 0; n < 20000; n++) begin
        my = q_ref(m2);
        checks++;
        if (longint'(y) != my) begin
          failures++;
          if (failures < 10) $display("t%0d n%0d y=%0d ref=%0d", t, n, y, my);
        end
        sum_y += longint'(y);
        err_acc += longint'(y) * one - longint'(x);
        if (n > 100 && (err_acc > max_err || -err_acc > max_err))
          max_err = (err_acc > 0) ? err_acc : -err_acc;
        // reference update, applied at the coming rising edge
        m2 = m2 + m1 - 2 * my * one;
        m1 = m1 + longint'(x) - my * one;
        @(negedge clk);
      end
      mean = real'(sum_y) / 20000.0;
      checks++;
      if (mean - real'(x) / 131072.0 > 0.005 || real'(x) / 131072.0 - mean > 0.005) begin
        failures++; $display("mean %f vs %f", mean, real'(x) / 131072.0);
      end
      checks++;
      if (max_err > 16 * one) begin failures++; $display("error sum not bounded: %0d", max_err); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
