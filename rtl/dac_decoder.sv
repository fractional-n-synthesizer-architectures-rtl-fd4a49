// dac_decoder: 5-bit code to 32 one-hot switch selects of the string DAC.
//
// sel[k] closes the switch on tap k of the resistor string (tap 0 is ground,
// tap 31 is 31/32 of the reference). Exactly one select is high at a time.
// Purely combinational. The decoder function follows the design description;
// a one-hot (rather than thermometer) code matches the single switch per tap.
`timescale 1ns/1fs
module dac_decoder
  import fnpll_pkg::*;
#(
  parameter int unsigned IN_W = DAC_OUT_W
) (
  input  logic [IN_W-1:0]       code,
  output logic [(1<<IN_W)-1:0]  sel
);

  always_comb begin
    sel = '0;
    sel[code] = 1'b1;
  end

endmodule
