// tx_ctrl: channel selection, transmit data source and bit timing.
//
// Holds the sixteen programmed division ratios and adds the FSK offset when
// the current data bit is 1, forming the 20-bit divider-ratio word of the
// synthesizer. A bit counter divides the reference clock by BIT_PERIOD (200,
// which gives 927.5 kb/s from 185.5 MHz) and at the end of each bit loads the
// next bit, either from the on-chip PRBS generator (test mode, prbs_mode = 1)
// or from the external data input.
//
// Interface: chan selects the ratio table entry (static between uses);
// data and ratio change together one reference cycle after bit_strobe.
// Sixteen ratios, the PRBS test mode and the data rate follow the design
// description; the table contents (5 MHz channel spacing ending at the nominal
// 12.075), the FSK offset and loading data through a bit counter are choices
// of this design.
`timescale 1ns/1fs
module tx_ctrl
  import fnpll_pkg::*;
#(
  parameter int unsigned  BIT_PERIOD = BIT_PERIOD_REF,
  parameter ratio_table_t RATIO_TABLE = default_ratio_table(),
  parameter int           FSK_DEV    = FSK_DEV_CODE
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [3:0]         chan,
  input  logic               prbs_mode,
  input  logic               ext_data,
  output logic [RATIO_W-1:0] ratio,
  output logic               data,
  output logic               bit_strobe
);

  localparam int unsigned CW = $clog2(BIT_PERIOD + 1);

  logic [CW-1:0] cnt;
  logic          prbs_bit;

  assign bit_strobe = (cnt == CW'(BIT_PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      data <= 1'b0;
    end else begin
      cnt <= bit_strobe ? '0 : cnt + 1'b1;
      if (bit_strobe) data <= prbs_mode ? prbs_bit : ext_data;
    end
  end

  prbs16 u_prbs (
    .clk     (clk),
    .rst_n   (rst_n),
    .step    (bit_strobe && prbs_mode),
    .bit_out (prbs_bit),
    .state   ()
  );

  assign ratio = RATIO_TABLE[chan] + (data ? RATIO_W'(FSK_DEV) : '0);

endmodule
