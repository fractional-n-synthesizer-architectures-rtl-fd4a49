// prog_divider: asynchronous programmable divider, ratio 8..15.
//
// Three identical divide-by-2/3 cells in a ripple chain: only the first cell
// runs at the VCO frequency, each later cell is clocked by the output of the
// one before. Cell k swallows 2^k input periods once per output period when
// its control bit is set, so the ratio is
//   8 + CON0 + 2*CON1 + 4*CON2.
// The control word comes from the reference-clocked sigma-delta modulator. To
// keep all three bits of one ratio together it is captured on the rising edge
// of the divider output, which starts every output period; the cells then use
// that value for the whole period.
//
// Interface: vco_clk (fast input), con (asynchronous to vco_clk), div_out.
// Timing: output period k lasts 8 + con_q(k) input periods, where con_q(k) is
// con as captured at the rising edge that starts period k.
// Cell chain and ratio formula follow the design description; the capture
// register is a choice of this design (the description does not say how the
// control crosses into the divider). The mod_out of the first cell has no
// consumer: the output is taken as the clock of the last cell, so lint
// reports that bit of the mod chain as unused.
`timescale 1ns/1fs
module prog_divider
  import fnpll_pkg::*;
#(
  parameter int unsigned N_CELLS = CON_W
) (
  input  logic               vco_clk,
  input  logic               rst_n,
  input  logic [N_CELLS-1:0] con,
  output logic               div_out,
  output logic [N_CELLS-1:0] con_q
);

  logic [N_CELLS:0]   clk_chain;
  logic [N_CELLS:0]   mod_chain;   // mod_chain[k] is mod_in of cell k

  assign clk_chain[0]       = vco_clk;
  assign mod_chain[N_CELLS] = 1'b1;

  for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
    logic mod_out_k;
    div23_cell u_cell (
      .fin     (clk_chain[k]),
      .rst_n   (rst_n),
      .mod_in  (mod_chain[k+1]),
      .p       (con_q[k]),
      .fo      (clk_chain[k+1]),
      .mod_out (mod_out_k)
    );
    assign mod_chain[k] = mod_out_k;
  end

  assign div_out = clk_chain[N_CELLS];

  always_ff @(posedge div_out or negedge rst_n) begin
    if (!rst_n) con_q <= '0;
    else        con_q <= con;
  end

endmodule
