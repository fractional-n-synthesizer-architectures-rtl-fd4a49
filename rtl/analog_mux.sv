// analog_mux: behavioural model of the break-before-make analog multiplexer
// between the two DAC filter outputs and the VCO control input (analog part;
// not synthesizable).
//
// Two analog switches connect either path A or path B to the VCO input. Both
// must never be on together, as that would short the two DAC filters; a
// cross-coupled break-before-make stage with an RC delay guarantees it. The
// model opens the active switch as soon as sel_a changes and closes the other
// one T_BBM_NS later. While both are open the VCO input holds its voltage
// (its node capacitance), which the model expresses by keeping vout.
//
// Interface: va, vb, vout in volts; sel_a = 1 selects path A; sw_a/sw_b are
// the switch gate states. An immediate assertion checks that the two
// switches are never on together.
// The switch pair and the break-before-make rule follow the design
// description; the 0.2 ns gap is an assumption of this model.
`timescale 1ns/1fs
module analog_mux #(
  parameter real T_BBM_NS = 0.2
) (
  input  real  va,
  input  real  vb,
  input  logic sel_a,
  output real  vout,
  output logic sw_a,
  output logic sw_b
);

  initial begin
    sw_a = 1'b0;
    sw_b = 1'b1;
    vout = vb;
  end

  always @(sel_a) begin
    sw_a = 1'b0;
    sw_b = 1'b0;
    #(T_BBM_NS);
    if (sel_a) sw_a = 1'b1;
    else       sw_b = 1'b1;
  end

  always @(sw_a or sw_b or va or vb) begin
    assert (!(sw_a && sw_b)) else $error("analog_mux: both switches on");
    if (sw_a)      vout = va;
    else if (sw_b) vout = vb;
  end

endmodule
