// tb_fnpll_channels: acquisition and lock on all 16 channels of the
// synthesizer at its default parameters.
//
// For every channel the testbench picks the highest-frequency VCO capacitor
// bank whose reachable tuning range holds the channel at least BAND_MARGIN
// below its top. The top of a band is set by the highest DAC tap, 31/32 of
// 1.4 V (25 MHz/V), not by 1.4 V itself; starting the sweep less than the
// pull-in range (about 1.9 MHz) above the channel is avoided. It then pulses the
// reset, so the loop integrator restarts at full scale (top of that band) and
// sweeps down until the phase quantizer captures the channel. After
// ACQ_CYC reference cycles it measures the VCO frequency from its rising
// edges over MEAS_CYC reference cycles. Checks per channel:
//   - the measured frequency is within 20 kHz of Fref * (8 + ratio);
//   - the ratio word is the channel table entry (5 MHz channel spacing);
//   - the integrator is inside the range the DAC can reproduce (the loop
//     is in control rather than clipped).
// The channels are visited in a random order ($urandom). The testbench
// counts locks, bank changes and the banks used.
`timescale 1ns/1fs
module tb_fnpll_channels;
  import fnpll_pkg::*;

  localparam int  ACQ_CYC   = 20000;
  localparam int  MEAS_CYC  = 2000;
  localparam real BAND_TOP0 = 2222.4e6 + KVCO_HZ_V * VREF * 31.0 / 32.0; // bank 0, top tap
  localparam real BAND_MARGIN = 3.0e6;
  localparam real BANK_STEP = 500.0e6 / 15.0; // per bank step

  logic ref_clk = 0, rst_n = 0;
  logic [3:0] chan = 4'd15, bank = 4'd0;
  logic rf_out, div_out, pd_q, data, bit_strobe, upd_ab, upd_ba, sw_a, sw_b;
  logic [2:0] con_q;
  logic [19:0] ratio, loop_ctrl;
  logic signed [16:0] delta;
  real vctl, f_vco;

  int checks = 0, failures = 0;
  int n_lock = 0, n_bank_change = 0;
  int unsigned banks_used = 0;

  fnpll_top dut (
    .ref_clk, .rst_n, .chan, .prbs_mode (1'b0), .ext_data (1'b0), .sw_en (1'b0),
    .kpd (20'(KPD_CODE)), .cap_bank (bank),
    .rf_out, .div_out, .pd_q, .ratio, .con_q, .loop_ctrl, .data, .bit_strobe,
    .delta, .upd_ab, .upd_ba, .mux_sw_a (sw_a), .mux_sw_b (sw_b),
    .vctl, .vco_freq_hz (f_vco)
  );

  always #(0.5e9 / F_REF_HZ) ref_clk = ~ref_clk;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  rf_cnt = 0;
  real rf_t = 0.0;
  always @(posedge rf_out) begin rf_cnt++; rf_t = $realtime; end

  initial begin
    int order [16];
    ratio_table_t tab;
    tab = default_ratio_table();
    for (int k = 0; k < 16; k++) order[k] = k;
    for (int k = 15; k > 0; k--) begin
      int j, t;
      j = int'($urandom % (k + 1));
      t = order[k]; order[k] = order[j]; order[j] = t;
    end

    for (int n = 0; n < 16; n++) begin
      int c0, b;
      real t0, ft, fm, err;
      logic [3:0] new_bank;
      chan = 4'(order[n]);
      ft = F_REF_HZ * (8.0 + real'(tab[order[n]]) / real'(1 << RATIO_FRAC));
      b = int'($floor((BAND_TOP0 - BAND_MARGIN - ft) / BANK_STEP));
      new_bank = 4'(b);
      if (new_bank != bank) n_bank_change++;
      bank = new_bank;
      banks_used |= 1 << b;
      rst_n = 0;
      repeat (3) @(posedge ref_clk);
      rst_n = 1;
      repeat (ACQ_CYC) @(posedge ref_clk);
      @(posedge rf_out);
      c0 = rf_cnt; t0 = rf_t;
      repeat (MEAS_CYC) @(posedge ref_clk);
      fm = real'(rf_cnt - c0) / (rf_t - t0) * 1.0e9;
      err = fm - ft;
      $display("channel %0d bank %0d: f=%0.3f MHz target=%0.3f MHz error=%0.1f kHz ctrl=%0d",
               order[n], b, fm / 1e6, ft / 1e6, err / 1e3, loop_ctrl);
      checks++;
      if (err > -20.0e3 && err < 20.0e3) n_lock++;
      else begin failures++; $display("channel %0d not locked", order[n]); end
      checks++;
      if (ratio != tab[order[n]]) begin failures++; $display("ratio word wrong"); end
      checks++;
      if (loop_ctrl < 20'd2000 || loop_ctrl > 20'd1015808 - 20'd2000) begin
        failures++; $display("integrator at its limit");
      end
    end
    $display("counts: locks=%0d bank_changes=%0d banks_used=%b", n_lock, n_bank_change,
             banks_used[3:0]);
    checks++;
    if (n_lock != 16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
