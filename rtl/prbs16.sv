// prbs16: 16-bit Galois LFSR test-data generator.
//
// A multiple-return shift register with feedback taps at stages 16, 15, 13
// and 4 (polynomial x^16 + x^15 + x^13 + x^4 + 1), giving a maximal sequence
// of 2^16 - 1 bits. On each enabled clock the register shifts right and, when
// the bit shifted out is 1, the tap mask 16'hD008 is XORed in.
// Interface: step advances the register by one; bit_out is the current LSB.
// Reset loads SEED (must be non-zero). Length, taps and Galois form follow
// the design description; the shift direction and seed are choices of this
// design.
`timescale 1ns/1fs
module prbs16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic        bit_out,
  output logic [15:0] state
);

  localparam logic [15:0] TAPS = 16'hD008;  // stages 16, 15, 13, 4

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (step) state <= (state >> 1) ^ (state[0] ? TAPS : 16'h0000);
  end

  assign bit_out = state[0];

endmodule
