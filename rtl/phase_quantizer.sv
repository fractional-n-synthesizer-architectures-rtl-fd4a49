// phase_quantizer: single flip-flop phase detector with Kpd scaling.
//
// On every rising edge of the reference clock one flip-flop samples the
// divided-down VCO clock. Its one-bit result says on which side of the
// reference edge the divider edge lies, so the flop acts as a one-bit phase
// quantizer. The bit is mapped to +Kpd (flop = 1) or -Kpd (flop = 0), the
// signed word that feeds both the phase-minimization loop (subtracted from
// the divider ratio) and the loop integrator. Sigma-delta dither on the
// divider makes the low-pass average of this word proportional to phase.
//
// Interface: ref_clk/rst_n (async, active low), div_clk is the asynchronous
// divider output, kpd the programmable step in 2^-17 ratio units.
// Timing: q and pd_out change one reference edge after the sampled instant;
// pd_out is a combinational function of the flop.
// The flop, the Kpd mapping and 0 being read as -1 follow the design
// description; no synchronizer is added after the decision flop, as the
// decision flop itself plays the role of a comparator. Reset clears the flop.
`timescale 1ns/1fs
module phase_quantizer
  import fnpll_pkg::*;
(
  input  logic                ref_clk,
  input  logic                rst_n,
  input  logic                div_clk,
  input  logic [RATIO_W-1:0]  kpd,
  output logic                q,
  output pd_word_t            pd_out
);

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= div_clk;
  end

  always_comb begin
    pd_out = q ? pd_word_t'({1'b0, kpd}) : -pd_word_t'({1'b0, kpd});
  end

endmodule
