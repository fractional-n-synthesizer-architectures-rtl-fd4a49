// loop_integrator: digital loop gain Klp and integrator z^-1/(1-z^-1).
//
// The phase quantizer output (+/-Kpd in ratio units) is scaled by the loop
// gain Klp and accumulated once per reference cycle. The accumulator is the
// digital VCO control: its 20-bit value spans the DAC reference (1.4 V) and
// its upper 16 bits go to the DAC sigma-delta. Klp sets the bandwidth of the
// outer PLL loop (Kpd sets that of the inner phase-minimization loop).
//
//   acc[n+1] = sat(acc[n] + (pd[n] * KLP_CODE) >>> 16)
//
// With Kpd = 0.01 and Klp = 0.025 one step is 0.25 mV, or 187 LSB of the
// 20-bit word. Interface: pd is signed, ctrl/ctrl16 are unsigned; one
// reference cycle of latency (the z^-1). Reset loads INIT, full scale: out
// of lock the quantizer reads 0 more often than 1 (the divided clock is high
// for less than half its period), so the loop can only pull the VCO down
// during acquisition and therefore starts from the top of the band.
// The gain/integrator structure, Klp = 0.025 and the 20/16-bit widths follow
// the design description; saturation and the reset value are choices of this
// design.
`timescale 1ns/1fs
module loop_integrator
  import fnpll_pkg::*;
#(
  parameter int unsigned W        = LOOP_W,
  parameter int unsigned OUT_W    = DAC_IN_W,
  parameter int          KLP_Q16  = KLP_CODE,
  parameter logic [W-1:0] INIT    = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pd_word_t         pd,
  output logic [W-1:0]     ctrl,
  output logic [OUT_W-1:0] ctrl16
);

  localparam int unsigned PW = $bits(pd_word_t) + 18;
  localparam int unsigned SW = W + 2;

  logic signed [PW-1:0] prod;
  logic signed [SW-1:0] step, sum;

  always_comb begin
    prod = PW'(pd) * PW'(KLP_Q16);
    step = SW'(prod >>> KLP_FRAC);
    sum  = $signed({2'b00, ctrl}) + step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   ctrl <= INIT;
    else if (sum < 0)             ctrl <= '0;
    else if (sum > SW'((1 << W) - 1)) ctrl <= '1;
    else                          ctrl <= W'(sum);
  end

  assign ctrl16 = ctrl[W-1 -: OUT_W];

endmodule
