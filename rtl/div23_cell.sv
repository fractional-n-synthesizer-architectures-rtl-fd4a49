// div23_cell: one modular divide-by-2/3 cell of the programmable divider.
//
// The cell divides its input clock by 2, or by 3 for one output period when
// both its mod_in and its control bit p are high. mod_in arrives from the
// next (slower) cell and is high for one period of this cell's output per
// period of the whole divider; mod_out, sent to the previous (faster) cell,
// is mod_in retimed to last one input period. The last cell of a chain gets
// mod_in tied high.
//
// Implementation: a three-state counter on the rising input edge. States S0
// and S1 make a /2 cycle; the decision taken in S1 adds state S2 (a swallowed
// input period) when mod_in and p are both high. fo is registered and high
// in S0. mod_out goes high on the edge that leaves S0 while mod_in is high,
// for exactly one input period.
// The prescaler / end-of-cycle split and the swallow rule follow the design
// description; the state encoding and using edge-triggered flops in place of
// latches are choices of this design. Asynchronous active-low reset.
`timescale 1ns/1fs
module div23_cell (
  input  logic fin,
  input  logic rst_n,
  input  logic mod_in,
  input  logic p,
  output logic fo,
  output logic mod_out
);

  typedef enum logic [1:0] {S0 = 2'd0, S1 = 2'd1, S2 = 2'd2} cell_state_t;
  cell_state_t state, state_next;

  always_comb begin
    unique case (state)
      S0:      state_next = S1;
      S1:      state_next = (mod_in && p) ? S2 : S0;
      default: state_next = S0;
    endcase
  end

  always_ff @(posedge fin or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S0;
      fo      <= 1'b0;
      mod_out <= 1'b0;
    end else begin
      state   <= state_next;
      fo      <= (state_next == S0);
      mod_out <= mod_in && (state == S0);
    end
  end

endmodule
