// bist_pkg: constants and types shared by the converter BIST blocks.
//
// All analog quantities are in volts. One LSB is the same for both
// converters (2 V / 2^8 = 1 V / 2^7), the difference amplifiers have a gain
// of K = 128 so that K * 1 LSB = 1 V, and the two comparator references are
// K/2 LSB = 0.5 V and 3K/2 LSB = 1.5 V. These numbers are the ones of the
// evaluated setup. Analog levels are measured from V_FSR_LOW = -1 V, the
// lowest full-scale voltage of any configuration; SEG_LSB is the input span
// of one sub-amplifier of the divided amplifier (0.5 V).
//
// The LSB, K and reference values are those of the evaluated setup; the
// counter-width function (sized so that a run never wraps the counter) is this
// design's choice.
package bist_pkg;

  localparam real LSB_V      = 2.0 / 256.0;
  localparam real K_GAIN     = 128.0;
  localparam real VREF_HI_V  = 1.5;
  localparam real VREF_LO_V  = 0.5;
  localparam real V_FSR_LOW  = -1.0;
  localparam int unsigned SEG_LSB = 64;

  // Width of the shared counter for a given configuration: it must hold the
  // load value 3 plus the number of half-LSB steps of a whole test run,
  // which ends when the later of the two converter tests ends.
  function automatic int unsigned cnt_width(int unsigned n, int unsigned m,
                                            int unsigned adc_low, int unsigned dac_low);
    int unsigned ramp0, a_off, d_off, adc_end, dac_end, last;
    ramp0   = (adc_low < dac_low) ? adc_low : dac_low;
    a_off   = adc_low - ramp0;
    d_off   = dac_low - ramp0;
    adc_end = 2 * a_off + (1 << (n + 1));
    dac_end = 2 * d_off + 1 + (1 << (m + 1));
    last    = 3 + ((adc_end > dac_end) ? adc_end : dac_end) + 1;
    return $clog2(last + 1);
  endfunction

  // Sequencer state of one test run.
  typedef enum logic [1:0] {
    ST_IDLE,     // waiting for start
    ST_AUTOZERO, // comparators store their offsets (phi21)
    ST_RUN,      // ramp running, both converters under test
    ST_DONE      // both tests finished, results held
  } ctrl_state_e;

endpackage
