// string_dac: behavioural model of the resistor-string DAC and its
// reconstruction filter (analog part; not synthesizable).
//
// A string of 32 equal resistors between the reference and ground gives taps
// at k * VREF / 32, k = 0..31; the one-hot select closes one CMOS switch and
// connects that tap to a two-pole RC filter whose output drives the analog
// multiplexer in front of the VCO. The filter removes the sigma-delta noise of
// the 5-bit code; its poles lie far above the loop bandwidth.
// The model evaluates the ideal tap voltage and integrates the two RC sections
// exactly (exponential step) every TSTEP_NS.
//
// Interface: sel (one-hot, from the decoder), v_tap the unfiltered tap
// voltage, vout the filtered output, both real volts.
// The 32-tap string, the 1.4 V reference and the two RC poles follow the
// design description; the pole time constants and the model time step are
// assumptions of this model. If several switches are closed the taps are
// shorted together and the model takes their average; if none is closed the
// filter input floats, so the first capacitor simply keeps its charge
// (v_tap then reads 0).
`timescale 1ns/1fs
module string_dac
  import fnpll_pkg::*;
#(
  parameter int unsigned LEVELS  = DAC_LEVELS,
  parameter real         V_REF   = VREF,
  parameter real         TAU1_NS = 30.0,
  parameter real         TAU2_NS = 30.0,
  parameter real         TSTEP_NS = 1.0,
  parameter real         V_INIT  = VREF
) (
  input  logic [LEVELS-1:0] sel,
  output real               v_tap,
  output real               vout
);

  real v1;
  real a1, a2;

  // voltage at the common node of the switches: the mean of the closed taps
  function automatic real tap_voltage(logic [LEVELS-1:0] s);
    real sum;
    int  n;
    sum = 0.0;
    n   = 0;
    for (int k = 0; k < LEVELS; k++)
      if (s[k]) begin
        sum += V_REF * real'(k) / real'(LEVELS);
        n++;
      end
    return (n == 0) ? 0.0 : sum / real'(n);
  endfunction

  assign v_tap = tap_voltage(sel);

  initial begin
    a1   = 1.0 - $exp(-TSTEP_NS / TAU1_NS);
    a2   = 1.0 - $exp(-TSTEP_NS / TAU2_NS);
    v1   = V_INIT;
    vout = V_INIT;
  end

  always begin
    #(TSTEP_NS);
    if (sel != '0) v1 = v1 + (v_tap - v1) * a1;
    vout = vout + (v1 - vout) * a2;
  end

endmodule
