// tb_fnpll_top: end-to-end test of the synthesizer at its default parameters
// (185.5 MHz reference, 927.5 kb/s, Kpd 0.01, Klp 0.025).
//
// The VCO frequency is measured from the times of its rising edges over a
// window of reference cycles and compared with 185.5 MHz * (8 + ratio/2^17).
//   1. Lock on channel 15 (12.075, 2.2399 GHz) from reset.
//   2. Channel switch to channel 12 (15 MHz lower) and relock; then a reset
//      back to channel 15 (upward pull-in is limited to about Kpd * Fref).
//   3. 2-FSK with external random data and the switching scheme off: the
//      frequency at the end of each bit is far from the target.
//   4. 2-FSK with PRBS test data and the switching scheme on: after Delta has
//      been learned, the frequency at the end of each bit is on target, and
//      Delta must settle within 40 bit periods (the number is printed).
// Each mechanism is counted and must occur: quantizer 1s and 0s, divider
// ratio dithering over several values, lock, relock after a channel switch,
// Delta updates on both transitions, break-before-make gaps in the analog
// multiplexer, PRBS and external data, switching off and on.
`timescale 1ns/1fs
module tb_fnpll_top;
  import fnpll_pkg::*;

  logic ref_clk = 0, rst_n = 0;
  logic [3:0] chan = 4'd15;
  logic prbs_mode = 0, ext_data = 0, sw_en = 0;
  logic rf_out, div_out, pd_q, data, bit_strobe, upd_ab, upd_ba, sw_a, sw_b;
  logic [2:0] con_q;
  logic [19:0] ratio, loop_ctrl;
  logic signed [16:0] delta;
  real vctl, f_vco;

  int checks = 0, failures = 0;

  fnpll_top dut (
    .ref_clk, .rst_n, .chan, .prbs_mode, .ext_data, .sw_en,
    .kpd (20'(KPD_CODE)), .cap_bank (4'd0),
    .rf_out, .div_out, .pd_q, .ratio, .con_q, .loop_ctrl, .data, .bit_strobe,
    .delta, .upd_ab, .upd_ba, .mux_sw_a (sw_a), .mux_sw_b (sw_b),
    .vctl, .vco_freq_hz (f_vco)
  );

  always #(0.5e9 / F_REF_HZ) ref_clk = ~ref_clk;

  // ---- mechanism counters ---------------------------------------------------
  int n_q1 = 0, n_q0 = 0, n_ab = 0, n_ba = 0, n_gap = 0, n_lock = 0, n_relock = 0;
  int n_prbs_bits = 0, n_ext_bits = 0, n_sw_off_bits = 0, n_sw_on_bits = 0;
  int unsigned con_seen = 0;

  always @(posedge ref_clk) if (rst_n) begin
    if (pd_q) n_q1++; else n_q0++;
    if (upd_ab) n_ab++;
    if (upd_ba) n_ba++;
    if (bit_strobe) begin
      if (prbs_mode) n_prbs_bits++; else n_ext_bits++;
      if (sw_en) n_sw_on_bits++; else n_sw_off_bits++;
    end
  end
  always @(posedge div_out) con_seen |= 1 << con_q;

  // Delta convergence: bit periods from switching on until Delta first stays
  // within 10 % of the step expected for the deviation (868, see below)
  int bits_on = 0, conv_bit = -1;
  always @(posedge ref_clk) if (rst_n && sw_en && bit_strobe) begin
    bits_on++;
    if (delta >= 17'sd781 && delta <= 17'sd955) begin
      if (conv_bit < 0) conv_bit = bits_on;
    end else conv_bit = -1;
  end
  always @(sw_a or sw_b) if (!sw_a && !sw_b) n_gap++;

  // ---- frequency measurement --------------------------------------------------
  int  rf_cnt = 0;
  real rf_t = 0.0;
  always @(posedge rf_out) begin rf_cnt++; rf_t = $realtime; end

  task automatic measure(input int ncyc, output real f_meas, output real f_target);
    int c0;
    real t0;
    @(posedge rf_out);
    c0 = rf_cnt; t0 = rf_t;
    f_target = F_REF_HZ * (8.0 + real'(ratio) / real'(1 << RATIO_FRAC));
    repeat (ncyc) @(posedge ref_clk);
    f_meas = real'(rf_cnt - c0) / (rf_t - t0) * 1.0e9;
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // ---- watchdog -----------------------------------------------------------------
  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- FSK run: mean |error| at the end of the bits ---------------------------------
  task automatic fsk_run(input int nbits, input int skip, output real mean_err);
    real fm, ft, sum;
    int n;
    sum = 0.0; n = 0;
    for (int b = 0; b < nbits; b++) begin
      @(posedge ref_clk iff bit_strobe);
      ext_data = 1'($urandom);
      repeat (140) @(posedge ref_clk);
      measure(50, fm, ft);
      if (b >= skip) begin sum += absr(fm - ft); n++; end
    end
    mean_err = sum / real'(n);
  endtask

  initial begin
    real fm, ft, err_off, err_on;
    #20 rst_n = 1;

    // 1. lock on the nominal channel
    repeat (6000) @(posedge ref_clk);
    measure(2000, fm, ft);
    $display("lock: f=%0.3f MHz target=%0.3f MHz", fm / 1e6, ft / 1e6);
    checks++;
    if (absr(fm - ft) < 20.0e3) n_lock++;
    else begin failures++; $display("not locked on channel 15"); end

    // 2. channel switch and relock
    chan = 4'd12;
    repeat (12000) @(posedge ref_clk);
    measure(2000, fm, ft);
    $display("relock: f=%0.3f MHz target=%0.3f MHz", fm / 1e6, ft / 1e6);
    checks++;
    if (absr(fm - ft) < 20.0e3) n_relock++;
    else begin failures++; $display("not relocked on channel 12"); end
    // back to channel 15: the quantizer pulls in only about +/-1.9 MHz
    // upwards, so the loop is restarted from its reset state (top of the band)
    chan = 4'd15;
    rst_n = 0;
    repeat (3) @(posedge ref_clk);
    rst_n = 1;
    repeat (6000) @(posedge ref_clk);
    measure(2000, fm, ft);
    checks++;
    if (absr(fm - ft) < 20.0e3) n_lock++;
    else begin failures++; $display("not locked after restart"); end

    // 3. FSK, switching scheme off, external data
    sw_en = 0; prbs_mode = 0;
    fsk_run(60, 10, err_off);
    $display("FSK, switching off: mean |error| at bit end = %0.1f kHz", err_off / 1e3);

    // 4. FSK, switching scheme on, PRBS data
    sw_en = 1; prbs_mode = 1;
    fsk_run(120, 40, err_on);
    $display("FSK, switching on: mean |error| at bit end = %0.1f kHz, delta=%0d", err_on / 1e3, delta);
    checks++;
    if (err_on > 40.0e3) begin failures++; $display("FSK with switching not on target"); end
    checks++;
    if (err_on * 3.0 > err_off) begin failures++; $display("switching scheme gives no improvement"); end
    // Delta should approach the control step for 463.75 kHz:
    // 463.75e3 / 25e6 V / 1.4 V * 65536 = 868 LSB of the 16-bit word
    checks++;
    if (delta < 17'sd700 || delta > 17'sd1040) begin failures++; $display("delta %0d", delta); end
    $display("Delta within 10 %% of its final value after %0d bit periods", conv_bit);
    checks++;
    if (conv_bit < 0 || conv_bit > 40) begin failures++; $display("Delta did not converge"); end

    // ---- every mechanism must have happened --------------------------------------
    $display("counts: q1=%0d q0=%0d con_seen=%b lock=%0d relock=%0d ab=%0d ba=%0d gaps=%0d prbs=%0d ext=%0d off=%0d on=%0d",
             n_q1, n_q0, con_seen, n_lock, n_relock, n_ab, n_ba, n_gap, n_prbs_bits, n_ext_bits, n_sw_off_bits, n_sw_on_bits);
    checks++; if (n_q1 == 0 || n_q0 == 0) begin failures++; $display("quantizer stuck"); end
    checks++; if ($countones(con_seen) < 3) begin failures++; $display("divider not dithered"); end
    checks++; if (n_lock == 0) failures++;
    checks++; if (n_relock == 0) failures++;
    checks++; if (n_ab == 0) begin failures++; $display("no A->B update"); end
    checks++; if (n_ba == 0) begin failures++; $display("no B->A update"); end
    checks++; if (n_gap == 0) begin failures++; $display("no break-before-make gap"); end
    checks++; if (n_prbs_bits == 0 || n_ext_bits == 0) failures++;
    checks++; if (n_sw_on_bits == 0 || n_sw_off_bits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
