// tb_string_dac: selects random taps and checks that the tap voltage is
// exactly k * 1.4 / 32, that the filtered output has not yet settled 5 ns
// after a large step (the RC poles are there), and that it settles to the tap
// voltage within 1 mV after 600 ns. With every switch open the output must
// hold, and two closed switches give the mean of their taps.
`timescale 1ns/1fs
module tb_string_dac;
  logic [31:0] sel;
  real v_tap, vout;
  int checks = 0, failures = 0;

  string_dac dut (.sel, .v_tap, .vout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, kprev;
    real exp_v, dv;
    kprev = 16;
    sel = 32'd1 << 16;
    #600;
    for (int i = 0; i < 40; i++) begin
      k = (i % 2 == 0) ? ((kprev < 16) ? $urandom_range(24, 31) : $urandom_range(0, 7))
                       : $urandom_range(0, 31);
      sel = 32'd1 << k;
      exp_v = 1.4 * real'(k) / 32.0;
      #5;
      checks++;
      if (v_tap != exp_v) begin failures++; $display("tap %0d: %f", k, v_tap); end
      if (i % 2 == 0) begin
        dv = vout - exp_v;
        checks++;
        if (dv < 0.05 && dv > -0.05) begin failures++; $display("no filtering: %f vs %f", vout, exp_v); end
      end
      #595;
      dv = vout - exp_v;
      checks++;
      if (dv > 0.001 || dv < -0.001) begin failures++; $display("not settled: %f vs %f", vout, exp_v); end
      kprev = k;
    end
    // no switch closed: the filter input floats and the output must hold
    begin
      real v_hold;
      v_hold = vout;
      sel = '0;
      #300;
      checks++;
      if (vout - v_hold > 0.0001 || v_hold - vout > 0.0001) begin
        failures++; $display("no hold with all switches open: %f vs %f", vout, v_hold);
      end
      // two adjacent switches closed: the node sits at the mean of the taps
      sel = 32'b11 << 10;
      #1;
      checks++;
      if (v_tap != 1.4 * 10.5 / 32.0) begin failures++; $display("two taps: %f", v_tap); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
