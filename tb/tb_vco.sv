// tb_vco: sets control voltages and capacitor-bank codes and measures the
// output frequency by timing 20000 rising edges; it must match
// 2.2224 GHz - bank * 33.33 MHz + 25 MHz/V * v within 2 kHz, with the control
// clipped to 0..1.4 V.
`timescale 1ns/1fs
module tb_vco;
  real vctl, f_hz;
  logic [3:0] cap_bank;
  logic rf;
  int checks = 0, failures = 0;

  vco dut (.vctl, .cap_bank, .rf, .f_hz);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t0, t1, fm, fe, v;
    real vs [8] = '{0.0, 0.35, 0.7, 1.05, 1.4, -0.2, 1.8, 0.71234};
    for (int i = 0; i < 16; i++) begin
      vctl = vs[i % 8];
      cap_bank = 4'((i * 5) % 16);
      repeat (4) @(posedge rf);
      t0 = $realtime;
      repeat (20000) @(posedge rf);
      t1 = $realtime;
      fm = 20000.0 / (t1 - t0) * 1.0e9;
      v = (vctl < 0.0) ? 0.0 : ((vctl > 1.4) ? 1.4 : vctl);
      fe = 2.2224e9 - real'(cap_bank) * 500.0e6 / 15.0 + 25.0e6 * v;
      checks++;
      if (fm - fe > 2.0e3 || fe - fm > 2.0e3) begin
        failures++; $display("v=%f bank=%0d f=%f expected %f", vctl, cap_bank, fm, fe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
