// divider_sdm: second-order digital sigma-delta modulator for the divider.
//
// Two delaying integrators in cascade and a multi-bit quantizer. The output
// is fed back with weight 1 into the first integrator and weight 2 into the
// second, giving Y = z^-2 X + (1 - z^-1)^2 E: the average of the 3-bit output
// equals the 20-bit input while the quantization error is pushed to high
// frequencies.
//
//   v1[n+1] = v1[n] + x[n] - y[n]
//   v2[n+1] = v2[n] + v1[n] - 2 y[n]
//   y[n]    = round(v2[n]), limited to 0..7
//
// Interface: x is an unsigned 3.17 word (ratio minus 8), y the 3-bit divider
// control. Clocked by the reference; y is a function of the v2 register and
// so changes right after each reference edge. Reset clears both integrators.
// Structure, widths (20 in, 3 out) and the weight 2 follow the design
// description; the rounding quantizer with saturation and the integrator
// widths are choices of this design.
`timescale 1ns/1fs
module divider_sdm
  import fnpll_pkg::*;
#(
  parameter int unsigned IN_W   = RATIO_W,
  parameter int unsigned FRAC_W = RATIO_FRAC,
  parameter int unsigned OUT_W  = CON_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [IN_W-1:0]   x,
  output logic [OUT_W-1:0]  y
);

  localparam int unsigned ACC_W = IN_W + 5;
  localparam int unsigned Q_W   = ACC_W - FRAC_W;
  localparam logic signed [Q_W-1:0] YMAX = Q_W'((1 << OUT_W) - 1);

  logic signed [ACC_W-1:0] v1, v2;
  logic signed [Q_W-1:0]   v2_round;
  logic signed [ACC_W-1:0] y_fb;

  always_comb begin
    // round to nearest: add one half LSB of the output, then drop the fraction
    v2_round = Q_W'((v2 + ACC_W'(1 << (FRAC_W - 1))) >>> FRAC_W);
    if (v2_round < 0)         y = '0;
    else if (v2_round > YMAX) y = OUT_W'(YMAX);
    else                      y = OUT_W'(v2_round);
    y_fb = ACC_W'({1'b0, y}) <<< FRAC_W;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= '0;
      v2 <= '0;
    end else begin
      v1 <= v1 + ACC_W'({1'b0, x}) - y_fb;
      v2 <= v2 + v1 - (y_fb <<< 1);
    end
  end

endmodule
