// tb_fnpll_loop_step: closed-loop step response of the synthesizer at its
// default parameters, compared with the second-order loop model.
//
// The loop is locked on channel 15 with the FSK switching scheme off and
// external data 0. The data is then set to 1, which raises the division
// ratio by FSK_DEV (0.0025, 464 kHz). Only the loop can follow, so the loop
// integrator word traces the closed-loop step response. The testbench
// records it once per reference cycle and checks three things:
//   - the final step equals FSK_DEV / 2^17 * Fref / Kvco / 1.4 V * 2^20
//     (about 13900 LSB) within 5 % (the loop has no static error);
//   - the 50 % and 90 % crossing times agree within 15 % with those of
//     G2(s) = wn^2 / (s^2 + 2 zeta wn s + wn^2), where
//     wn = sqrt(2 Kpd Kvco Klp / T) and zeta = sqrt(Kpd / (2 T Kvco Klp)),
//     integrated here with real arithmetic;
//   - the response is monotonic to within the noise (no overshoot beyond
//     5 %), as zeta > 1 predicts.
// It prints the model's -3 dB bandwidth and the bandwidth scaled by the
// measured 50 % time, for comparison with the 142 kHz quoted for the loop.
`timescale 1ns/1fs
module tb_fnpll_loop_step;
  import fnpll_pkg::*;

  localparam int NREC = 4000;   // cycles recorded after the step
  localparam int NAVG = 16;     // moving-average length (noise of +-Kpd steps)

  logic ref_clk = 0, rst_n = 0;
  logic ext_data = 0;
  logic rf_out, div_out, pd_q, data, bit_strobe, upd_ab, upd_ba, sw_a, sw_b;
  logic [2:0] con_q;
  logic [19:0] ratio, loop_ctrl;
  logic signed [16:0] delta;
  real vctl, f_vco;

  int checks = 0, failures = 0;

  fnpll_top dut (
    .ref_clk, .rst_n, .chan (4'd15), .prbs_mode (1'b0), .ext_data, .sw_en (1'b0),
    .kpd (20'(KPD_CODE)), .cap_bank (4'd0),
    .rf_out, .div_out, .pd_q, .ratio, .con_q, .loop_ctrl, .data, .bit_strobe,
    .delta, .upd_ab, .upd_ba, .mux_sw_a (sw_a), .mux_sw_b (sw_b),
    .vctl, .vco_freq_hz (f_vco)
  );

  always #(0.5e9 / F_REF_HZ) ref_clk = ~ref_clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real rec [NREC];
  real sm  [NREC];

  // crossing time (in reference cycles) of level lv in a rising trace
  function automatic int t_cross(input real tr [NREC], input real lv);
    for (int i = 0; i < NREC; i++) if (tr[i] >= lv) return i;
    return NREC;
  endfunction

  initial begin
    real base, fin, step_exp, step_meas, peak;
    real wn, zeta, tref, y, yd, ydd, dt;
    real model [NREC];
    int m50, m90, t50, t90, n_step;
    real f3_model, w3;

    // ---- model of Eq. G2(s), per reference cycle ------------------------------
    tref = 1.0 / F_REF_HZ;
    wn   = $sqrt(2.0 * KPD * KVCO_HZ_V * KLP / tref);
    zeta = $sqrt(KPD / (2.0 * tref * KVCO_HZ_V * KLP));
    // -3 dB frequency of the second-order low-pass
    w3 = 1.0 - 2.0 * zeta * zeta;
    f3_model = wn * $sqrt(w3 + $sqrt(w3 * w3 + 1.0)) / (2.0 * 3.14159265358979);
    y = 0.0; yd = 0.0; dt = tref / 20.0;
    for (int i = 0; i < NREC; i++) begin
      for (int k = 0; k < 20; k++) begin
        ydd = wn * wn * (1.0 - y) - 2.0 * zeta * wn * yd;
        yd += ydd * dt;
        y  += yd * dt;
      end
      model[i] = y;
    end
    m50 = t_cross(model, 0.5);
    m90 = t_cross(model, 0.9);
    $display("model: fn=%0.1f kHz zeta=%0.3f -3dB=%0.1f kHz t50=%0d t90=%0d cycles",
             wn / 6.2831853e3, zeta, f3_model / 1e3, m50, m90);

    // ---- lock ------------------------------------------------------------------
    #20 rst_n = 1;
    repeat (8000) @(posedge ref_clk);
    base = 0.0;
    repeat (1000) begin @(posedge ref_clk); base += real'(loop_ctrl); end
    base /= 1000.0;

    // ---- step: data 1 from the next bit strobe on ------------------------------
    @(posedge ref_clk iff bit_strobe);
    ext_data = 1'b1;
    @(posedge ref_clk iff data);
    n_step = 1;
    for (int i = 0; i < NREC; i++) begin
      @(posedge ref_clk);
      rec[i] = real'(loop_ctrl) - base;
    end
    for (int i = 0; i < NREC; i++) begin
      real s;
      int  n;
      s = 0.0;
      n = 0;
      for (int k = i - NAVG / 2; k < i + NAVG / 2; k++)
        if (k >= 0 && k < NREC) begin s += rec[k]; n++; end
      sm[i] = s / real'(n);
    end
    fin = 0.0;
    for (int i = NREC - 1000; i < NREC; i++) fin += rec[i];
    fin /= 1000.0;

    step_exp = real'(FSK_DEV_CODE) / real'(1 << RATIO_FRAC) * F_REF_HZ / KVCO_HZ_V
               / VREF * real'(1 << LOOP_W);
    step_meas = fin;
    $display("step: measured %0.1f LSB, expected %0.1f LSB", step_meas, step_exp);
    checks++;
    if (step_meas < 0.95 * step_exp || step_meas > 1.05 * step_exp) begin
      failures++; $display("static step wrong");
    end

    for (int i = 0; i < NREC; i++) sm[i] = sm[i] / step_meas;
    t50 = t_cross(sm, 0.5);
    t90 = t_cross(sm, 0.9);
    peak = 0.0;
    for (int i = 0; i < NREC; i++) if (sm[i] > peak) peak = sm[i];
    $display("measured: t50=%0d t90=%0d cycles, peak=%0.3f, bandwidth scaled by t50 = %0.1f kHz",
             t50, t90, peak, f3_model * real'(m50) / real'(t50) / 1e3);

    checks++;
    if (real'(t50) < 0.85 * real'(m50) || real'(t50) > 1.15 * real'(m50)) begin
      failures++; $display("50%% time off the model");
    end
    checks++;
    if (real'(t90) < 0.85 * real'(m90) || real'(t90) > 1.15 * real'(m90)) begin
      failures++; $display("90%% time off the model");
    end
    checks++;
    if (peak > 1.05) begin failures++; $display("overshoot"); end
    checks++;
    if (n_step == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
