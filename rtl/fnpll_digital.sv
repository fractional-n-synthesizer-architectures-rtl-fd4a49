// fnpll_digital: the synthesized logic of the fractional-N synthesizer.
//
// Everything in the loop except the divider, DACs, multiplexer and VCO:
//   * phase quantizer: one flop samples the divider output on the reference
//     edge, mapped to +/-Kpd;
//   * phase-minimization loop: +/-Kpd is subtracted from the divider-ratio
//     word, and the second-order sigma-delta turns the result into the 3-bit
//     divider control, so the divider phase is pulled back towards the
//     reference within one quantization step;
//   * loop integrator: Klp times the sum of +/-Kpd, the digital VCO control;
//   * FSK switching: two control paths (L + Delta and L), each with a
//     first-order sigma-delta and a 5-to-32 decoder for its string DAC;
//   * transmit control: channel table, PRBS or external data, bit timing.
// All registers run on ref_clk except that div_clk is sampled asynchronously
// by the quantizer flop. Reset is asynchronous, active low.
// The block structure follows the design description; how the pieces share
// number formats is set in fnpll_pkg.
`timescale 1ns/1fs
module fnpll_digital
  import fnpll_pkg::*;
#(
  parameter int unsigned BIT_PERIOD = BIT_PERIOD_REF,
  parameter int          KLP_Q16    = KLP_CODE,
  parameter int          FSK_DEV    = FSK_DEV_CODE
) (
  input  logic                  ref_clk,
  input  logic                  rst_n,
  input  logic                  div_clk,
  input  logic [3:0]            chan,
  input  logic                  prbs_mode,
  input  logic                  ext_data,
  input  logic                  sw_en,
  input  logic [RATIO_W-1:0]    kpd,
  output logic [CON_W-1:0]      con,
  output logic [DAC_LEVELS-1:0] sel_a,
  output logic [DAC_LEVELS-1:0] sel_b,
  output logic                  mux_sel_a,
  output logic                  pd_q,
  output logic [RATIO_W-1:0]    ratio,
  output logic [LOOP_W-1:0]     loop_ctrl,
  output logic                  data,
  output logic                  bit_strobe,
  output logic signed [DAC_IN_W:0] delta,
  output logic                  upd_ab,
  output logic                  upd_ba
);

  pd_word_t                pd;
  logic [RATIO_W-1:0]      sdm_in;
  logic signed [RATIO_W+1:0] diff;
  logic [DAC_IN_W-1:0]     loop16, word_a, word_b;
  logic [DAC_OUT_W-1:0]    code_a, code_b;

  tx_ctrl #(.BIT_PERIOD(BIT_PERIOD), .FSK_DEV(FSK_DEV)) u_tx (
    .clk (ref_clk), .rst_n (rst_n), .chan (chan), .prbs_mode (prbs_mode),
    .ext_data (ext_data), .ratio (ratio), .data (data), .bit_strobe (bit_strobe)
  );

  phase_quantizer u_pq (
    .ref_clk (ref_clk), .rst_n (rst_n), .div_clk (div_clk), .kpd (kpd),
    .q (pd_q), .pd_out (pd)
  );

  // phase-minimization loop: divider ratio minus quantizer output
  always_comb begin
    diff = $signed({2'b00, ratio}) - (RATIO_W+2)'(pd);
    if (diff < 0)                                sdm_in = '0;
    else if (diff > (RATIO_W+2)'((1 << RATIO_W) - 1)) sdm_in = '1;
    else                                         sdm_in = RATIO_W'(diff);
  end

  divider_sdm u_dsdm (.clk (ref_clk), .rst_n (rst_n), .x (sdm_in), .y (con));

  loop_integrator #(.KLP_Q16(KLP_Q16)) u_int (
    .clk (ref_clk), .rst_n (rst_n), .pd (pd), .ctrl (loop_ctrl), .ctrl16 (loop16)
  );

  fsk_switch u_fsk (
    .clk (ref_clk), .rst_n (rst_n), .en (sw_en), .data (data),
    .loop_word (loop16), .word_a (word_a), .word_b (word_b),
    .mux_sel (mux_sel_a), .delta (delta), .upd_ab (upd_ab), .upd_ba (upd_ba)
  );

  dac_sdm u_sdm_a (.clk (ref_clk), .rst_n (rst_n), .x (word_a), .y (code_a));
  dac_sdm u_sdm_b (.clk (ref_clk), .rst_n (rst_n), .x (word_b), .y (code_b));

  dac_decoder u_dec_a (.code (code_a), .sel (sel_a));
  dac_decoder u_dec_b (.code (code_b), .sel (sel_b));

endmodule
