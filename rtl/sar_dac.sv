// sar_dac: behavioural model of the binary-weighted DAC of the SAR ADC.
//
// The real part is an analog capacitor or resistor DAC. This model gives its
// output level as a number on the same scale as the converter input: each
// bit k of the code contributes its actual weight 2**k + ERR[k], where ERR[k]
// is the mismatch error of that bit in input LSBs (all zero: an ideal DAC).
// Mismatched weights are what the foreground calibration measures.
//
// Interface: value (the code from the controller) in; vdac out, two bits
// wider than the code so that positive errors cannot overflow it (a negative
// total clamps to 0). Timing: combinational, no delay. The binary weighting
// follows the design; the mismatch parameter is this model's own means of
// injecting the errors that the calibration is meant to find.
module sar_dac
  import sar_pkg::*;
#(
  parameter int unsigned N = SAR_BITS,
  parameter int          ERR [N] = '{default: 0}
) (
  input  logic [N-1:0] value,
  output logic [N+1:0] vdac
);

  always_comb begin
    int acc;
    acc = 0;
    for (int k = 0; k < N; k++)
      if (value[k]) acc += (1 << k) + ERR[k];
    if (acc < 0) acc = 0;
    vdac = (N + 2)'(acc);
  end

endmodule
