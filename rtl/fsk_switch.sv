// fsk_switch: fast 2-FSK switching by sampling the VCO control.
//
// The loop alone cannot move the VCO control between the two FSK frequencies
// within one bit, because its bandwidth is far below the data rate. This block
// learns the required step instead of relying on the VCO gain. The VCO control
// path is split in two: path B carries the loop word L unchanged, path A
// carries L + Delta. Each path has its own DAC and filter, and an analog
// multiplexer (select = data) picks the one that drives the VCO, so the
// control steps instantly when the data changes.
// At every data transition the control value that held during the bit that
// just ended is sampled: path A's word on a 1->0 (A to B) transition, path B's
// word on a 0->1 (B to A) transition. Delta is then recomputed as the latest
// A sample minus the latest B sample. With no data transitions Delta is
// frozen and the block has no effect on the loop. Delta stays zero until both
// frequencies have been sampled once, and is held at zero while en is low
// (switching scheme off: both paths carry L).
//
// Interface: data = 1 selects frequency A (the higher one). Words are the
// unsigned 16-bit DAC inputs; delta is signed. Timing: a transition of data
// at one reference edge is sampled at the next edge, and the new Delta reaches
// word_a one edge later. word_b (the loop word) and mux_sel (the data bit)
// are the inputs passed straight through; they are outputs so that both DAC
// paths and the multiplexer are driven from one place.
// The two-path structure, sampling on both transitions and adding Delta to
// path A follow the design description; the one-cycle sampling delay, the
// zero start-up rule and saturation of word_a are choices of this design.
`timescale 1ns/1fs
module fsk_switch
  import fnpll_pkg::*;
#(
  parameter int unsigned W = DAC_IN_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                data,
  input  logic [W-1:0]        loop_word,
  output logic [W-1:0]        word_a,
  output logic [W-1:0]        word_b,
  output logic                mux_sel,
  output logic signed [W:0]   delta,
  output logic                upd_ab,   // Delta updated on an A->B transition
  output logic                upd_ba    // Delta updated on a B->A transition
);

  logic         data_d;
  logic [W-1:0] va_s, vb_s;
  logic         va_ok, vb_ok;
  logic signed [W+1:0] sum_a;

  assign word_b  = loop_word;
  assign mux_sel = data;

  always_comb begin
    sum_a = $signed({2'b00, loop_word}) + (W+2)'(delta);
    if (sum_a < 0)                       word_a = '0;
    else if (sum_a > (W+2)'((1 << W) - 1)) word_a = '1;
    else                                 word_a = W'(sum_a);
    upd_ab = en && data_d && !data && vb_ok;
    upd_ba = en && !data_d && data && va_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_d <= 1'b0;
      va_s   <= '0;
      vb_s   <= '0;
      va_ok  <= 1'b0;
      vb_ok  <= 1'b0;
      delta  <= '0;
    end else begin
      data_d <= data;
      if (!en) begin
        va_ok <= 1'b0;
        vb_ok <= 1'b0;
        delta <= '0;
      end else if (data_d && !data) begin          // end of an A bit
        va_s  <= word_a;
        va_ok <= 1'b1;
        if (vb_ok) delta <= $signed({1'b0, word_a}) - $signed({1'b0, vb_s});
      end else if (!data_d && data) begin          // end of a B bit
        vb_s  <= word_b;
        vb_ok <= 1'b1;
        if (va_ok) delta <= $signed({1'b0, va_s}) - $signed({1'b0, word_b});
      end
    end
  end

endmodule
