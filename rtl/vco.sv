// vco: behavioural model of the LC voltage-controlled oscillator (analog part;
// not synthesizable).
//
// The oscillator frequency is set coarsely by a bank of switched capacitors
// (about 500 MHz of digital tuning) and finely by the varactor voltage with
// an analog gain of 25 MHz/V:
//   f = F_TOP_HZ - cap_bank * BAND_STEP_HZ + KVCO_HZ_V * vctl
// The model accumulates the absolute time of the next half-period edge and
// waits for it, so delay rounding never accumulates into phase error. The
// wait is computed at run time; it is always positive because the frequency
// is bounded, although lint cannot prove that it is never zero.
//
// Interface: vctl (volts, clipped to 0..VREF), cap_bank (0 = no added
// capacitance, highest band), rf the square-wave output, f_hz the present
// frequency for observation.
// The 25 MHz/V gain and the 500 MHz switched range follow the design
// description. F_TOP_HZ is chosen so that 0.7 V (mid-scale of the DAC) gives
// 2.2399 GHz, the nominal output at ratio 12.075; the 4-bit bank and its
// equal steps are assumptions of this model.
`timescale 1ns/1fs
module vco
  import fnpll_pkg::*;
#(
  parameter real F_TOP_HZ     = 2.2224e9,
  parameter real BAND_STEP_HZ = 500.0e6 / 15.0,
  parameter real K_HZ_V       = KVCO_HZ_V,
  parameter real V_MAX        = VREF
) (
  input  real        vctl,
  input  logic [3:0] cap_bank,
  output logic       rf,
  output real        f_hz
);

  real t_next;   // starts at 0.0, the default of a real variable

  function automatic real freq(real vin, logic [3:0] bank);
    real v;
    v = (vin < 0.0) ? 0.0 : ((vin > V_MAX) ? V_MAX : vin);
    return F_TOP_HZ - real'(bank) * BAND_STEP_HZ + K_HZ_V * v;
  endfunction

  assign f_hz = freq(vctl, cap_bank);

  initial rf = 1'b0;

  // each half period is scheduled at an absolute time, so rounding of the
  // delays does not accumulate as phase error
  always begin
    t_next = t_next + 0.5e9 / freq(vctl, cap_bank);
    #(t_next - $realtime);
    rf = ~rf;
  end

endmodule
