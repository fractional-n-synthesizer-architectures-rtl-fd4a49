// fnpll_top: fractional-N 2-FSK synthesizer with a digital phase detector.
//
// A 185.5 MHz reference and an LC VCO near 2.24 GHz are locked through a
// loop in which the phase detector is a single flip-flop. The divider is
// sigma-delta controlled and the quantized phase is fed back into the
// sigma-delta input (phase-minimization loop), which keeps the divider edge
// within a step of the reference edge and makes the dithered flop a linear
// detector. A digital integrator with gain Klp replaces the charge pump and
// loop filter; its word drives the VCO through a sigma-delta string DAC. For
// 2-FSK a second DAC path carries the control word offset by a learned Delta,
// and an analog multiplexer switches between the two paths at each data
// transition so the frequency steps faster than the loop bandwidth allows.
//
// Hierarchy: fnpll_digital (synthesizable logic), prog_divider (asynchronous
// 2/3-cell divider, synthesizable), and behavioural models of the analog
// parts: two string_dac, analog_mux, vco. The RF output buffer is not modelled;
// rf_out is the VCO output.
// Interface: ref_clk, rst_n (async, active low), chan (0..15, 15 = 12.075),
// prbs_mode (test data), ext_data, sw_en (FSK switching scheme on), kpd
// (phase quantizer step, 1311 = 0.01), cap_bank (VCO coarse band).
// Observation outputs expose the loop word, Delta, the data and the VCO
// frequency. The select of the analog multiplexer is the data bit itself,
// a register output that the behavioural multiplexer also uses as an event,
// which lint reports as a signal used both synchronously and asynchronously.
// The loop constants (Kpd 0.01, Klp 0.025, 185.5 MHz, 12.075,
// 25 MHz/V, 927.5 kb/s) are the documented ones.
`timescale 1ns/1fs
module fnpll_top
  import fnpll_pkg::*;
#(
  parameter int unsigned BIT_PERIOD = BIT_PERIOD_REF,
  parameter int          KLP_Q16    = KLP_CODE,
  parameter int          FSK_DEV    = FSK_DEV_CODE
) (
  input  logic                     ref_clk,
  input  logic                     rst_n,
  input  logic [3:0]               chan,
  input  logic                     prbs_mode,
  input  logic                     ext_data,
  input  logic                     sw_en,
  input  logic [RATIO_W-1:0]       kpd,
  input  logic [3:0]               cap_bank,
  output logic                     rf_out,
  output logic                     div_out,
  output logic                     pd_q,
  output logic [RATIO_W-1:0]       ratio,
  output logic [CON_W-1:0]         con_q,
  output logic [LOOP_W-1:0]        loop_ctrl,
  output logic                     data,
  output logic                     bit_strobe,
  output logic signed [DAC_IN_W:0] delta,
  output logic                     upd_ab,
  output logic                     upd_ba,
  output logic                     mux_sw_a,
  output logic                     mux_sw_b,
  output real                      vctl,
  output real                      vco_freq_hz
);

  logic [CON_W-1:0]      con;
  logic [DAC_LEVELS-1:0] sel_a, sel_b;
  logic                  mux_sel_a;
  real                   va, vb;

  fnpll_digital #(.BIT_PERIOD(BIT_PERIOD), .KLP_Q16(KLP_Q16), .FSK_DEV(FSK_DEV)) u_dig (
    .ref_clk (ref_clk), .rst_n (rst_n), .div_clk (div_out), .chan (chan),
    .prbs_mode (prbs_mode), .ext_data (ext_data), .sw_en (sw_en), .kpd (kpd),
    .con (con), .sel_a (sel_a), .sel_b (sel_b), .mux_sel_a (mux_sel_a),
    .pd_q (pd_q), .ratio (ratio), .loop_ctrl (loop_ctrl), .data (data),
    .bit_strobe (bit_strobe), .delta (delta), .upd_ab (upd_ab), .upd_ba (upd_ba)
  );

  prog_divider u_div (
    .vco_clk (rf_out), .rst_n (rst_n), .con (con), .div_out (div_out), .con_q (con_q)
  );

  string_dac u_dac_a (.sel (sel_a), .v_tap (), .vout (va));
  string_dac u_dac_b (.sel (sel_b), .v_tap (), .vout (vb));

  analog_mux u_mux (
    .va (va), .vb (vb), .sel_a (mux_sel_a), .vout (vctl), .sw_a (mux_sw_a), .sw_b (mux_sw_b)
  );

  vco u_vco (.vctl (vctl), .cap_bank (cap_bank), .rf (rf_out), .f_hz (vco_freq_hz));

endmodule
