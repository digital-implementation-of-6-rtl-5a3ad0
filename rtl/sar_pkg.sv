// sar_pkg: constants and types shared by the SAR ADC and its foreground
// calibration logic.
//
// SAR_BITS is the converter resolution (6 bits, the resolution of the
// design). The calibration corrects the converter output with a weighted sum
// of per-bit coefficients; corr_width() gives the width that such a sum needs
// so that it can never overflow (N coefficients, each below 2**N). The state
// encodings of the two controllers are this design's own choice.
package sar_pkg;

  localparam int unsigned SAR_BITS = 6;

  // Width of a sum of n values that are each at most 2**n - 1.
  function automatic int unsigned corr_width(int unsigned n);
    return n + $clog2(n);
  endfunction

  // SAR conversion controller.
  typedef enum logic [1:0] {
    SAR_IDLE   = 2'd0,  // go low: held in reset
    SAR_SAMPLE = 2'd1,  // one cycle with sample high
    SAR_CONV   = 2'd2,  // one bit decided per cycle, MSB first
    SAR_DONE   = 2'd3   // result stable, valid high, until go falls
  } sar_state_e;

  // Foreground calibration sequencer.
  typedef enum logic [2:0] {
    CAL_IDLE  = 3'd0,  // normal operation, no calibration run yet
    CAL_START = 3'd1,  // one cycle: converter reset, ramp and coefficients cleared
    CAL_CONV  = 3'd2,  // converting the current test sample
    CAL_STORE = 3'd3,  // conversion finished: store it if it is a one-hot code
    CAL_DONE  = 3'd4   // whole test ramp converted, coefficients ready
  } cal_state_e;

endpackage
