// dac_sdm: first-order sigma-delta modulator in front of the string DAC.
//
// Converts the 16-bit VCO control word into a 5-bit DAC code whose average
// equals the input (in units of 2^11). The previous output is subtracted from
// the input, the difference is integrated, and the integrator is quantized:
//   w[i] = x[i-1] - y[i-1] + w[i-1]        y[i] = Q(w[i])
// so Y = X z^-1 + E (1 - z^-1): first-order shaped error, which the RC poles
// after the DAC remove.
//
// Interface: x unsigned 16 bits, y 5 bits, clocked by the reference.
// Timing: y is a function of the w register, one cycle behind x.
// The loop equation and widths follow the design description; the quantizer
// (floor to the 5 upper bits, limited to 0..31) and resetting w to zero are
// choices of this design.
`timescale 1ns/1fs
module dac_sdm
  import fnpll_pkg::*;
#(
  parameter int unsigned IN_W  = DAC_IN_W,
  parameter int unsigned OUT_W = DAC_OUT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  x,
  output logic [OUT_W-1:0] y
);

  localparam int unsigned LSB_W = IN_W - OUT_W;
  localparam int unsigned W_W   = IN_W + 3;
  localparam logic signed [W_W-1:0] YMAX = W_W'((1 << OUT_W) - 1);

  logic signed [W_W-1:0] w, wq;

  always_comb begin
    wq = w >>> LSB_W;
    if (wq < 0)         y = '0;
    else if (wq > YMAX) y = OUT_W'(YMAX);
    else                y = OUT_W'(wq);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) w <= '0;
    else        w <= w + W_W'({1'b0, x}) - (W_W'({1'b0, y}) <<< LSB_W);
  end

endmodule
