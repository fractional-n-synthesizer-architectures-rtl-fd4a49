// fnpll_pkg: number formats and loop constants shared by the fractional-N
// synthesizer with a single flip-flop phase detector.
//
// Fixed-point conventions used throughout the design:
//   * Divider-ratio words are 20 bits wide (as drawn in the loop diagrams) and
//     hold (N - 8) in unsigned 3.17 format: the programmable divider always
//     adds its base ratio of 8, and the divider sigma-delta produces the 3-bit
//     offset 0..7 on top of it. This split of the 20 bits is a choice of this
//     design; the width is the documented one.
//   * The VCO control word out of the loop integrator is 20 bits, of which the
//     upper 16 bits are passed to the DAC sigma-delta. Full scale of the
//     20-bit word corresponds to the DAC reference of 1.4 V.
//   * Kpd = 0.01 and Klp = 0.025 are the documented loop constants; they are
//     converted here into integer codes of the formats above.
`timescale 1ns/1fs
package fnpll_pkg;

  // ---- word widths ---------------------------------------------------------
  localparam int unsigned RATIO_W    = 20;  // divider ratio word
  localparam int unsigned RATIO_FRAC = 17;  // fractional bits of the ratio word
  localparam int unsigned CON_W      = 3;   // divider control (2/3 cell count)
  localparam int unsigned DIV_BASE   = 8;   // ratio with all CON bits low
  localparam int unsigned LOOP_W     = 20;  // loop integrator word
  localparam int unsigned DAC_IN_W   = 16;  // word into the DAC sigma-delta
  localparam int unsigned DAC_OUT_W  = 5;   // DAC code
  localparam int unsigned DAC_LEVELS = 32;  // resistor string taps

  // ---- documented operating point ------------------------------------------
  localparam real F_REF_HZ    = 185.5e6;    // reference clock
  localparam real N_NOM       = 12.075;     // nominal division ratio
  localparam real KPD         = 0.01;       // phase quantizer step (ratio units)
  localparam real KLP         = 0.025;      // loop gain (volt per ratio unit)
  localparam real VREF        = 1.4;        // DAC reference voltage
  localparam real KVCO_HZ_V   = 25.0e6;     // VCO analog gain
  localparam int unsigned BIT_PERIOD_REF = 200; // 185.5 MHz / 927.5 kb/s

  // ---- integer codes ---------------------------------------------------------
  // Kpd in 2^-17 ratio units: round(0.01 * 2^17) = 1311
  localparam int KPD_CODE = int'(KPD * real'(1 << RATIO_FRAC));
  // Klp converts ratio units into loop-word units (VREF / 2^20 per LSB):
  //   scale = Klp * 2^20 / (VREF * 2^17) = Klp * 8 / 1.4
  // held as an unsigned Q0.16 multiplier: round(0.142857 * 65536) = 9362
  localparam int unsigned KLP_FRAC = 16;
  localparam int KLP_CODE =
      int'(KLP * real'(1 << (LOOP_W - RATIO_FRAC)) / VREF * real'(1 << KLP_FRAC));
  // (N_nom - 8) in the ratio format: round(4.075 * 2^17) = 534118
  localparam logic [RATIO_W-1:0] RATIO_NOM =
      RATIO_W'(int'((N_NOM - real'(DIV_BASE)) * real'(1 << RATIO_FRAC)));

  // Signed output of the phase quantizer, +Kpd or -Kpd in ratio units.
  typedef logic signed [RATIO_W:0] pd_word_t;

  // ---- channel table ---------------------------------------------------------
  // Sixteen programmed division ratios. Entry 15 is the nominal 12.075; the
  // others lie below it in 5 MHz steps at the output (5e6 / 185.5e6 ratio
  // units = 3533 LSB), one entry per 2.4 GHz IEEE 802.15.4 channel spacing.
  localparam int CHAN_STEP = int'(5.0e6 / F_REF_HZ * real'(1 << RATIO_FRAC));
  typedef logic [RATIO_W-1:0] ratio_table_t [16];
  function automatic ratio_table_t default_ratio_table();
    ratio_table_t t;
    for (int k = 0; k < 16; k++)
      t[k] = RATIO_W'(int'(RATIO_NOM) - (15 - k) * CHAN_STEP);
    return t;
  endfunction

  // FSK offset of the division ratio for data = 1: 0.0025 ratio units, i.e.
  // 463.75 kHz between the two tones (modulation index 0.5 at 927.5 kb/s).
  localparam int FSK_DEV_CODE = int'(0.0025 * real'(1 << RATIO_FRAC));

endpackage
