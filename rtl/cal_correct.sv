// cal_correct: digital correction of the converter output with the
// calibration coefficients.
//
// The corrected output is the sum of the measured weights of the bits that
// are set in the raw code: corrected = sum over k of dout[k] * coef[k]. With
// nominal coefficients (2**k) it equals the raw code; with measured ones it
// expresses the result in true input levels, undoing the DAC mismatch.
//
// Interface: dout (raw code) and coef (N coefficients) in; corrected out,
// wide enough for any sum of N coefficients. Timing: combinational. Using
// the coefficients as the real bit weights follows the design; the
// weighted-sum form is the simplest circuit that does that.
module cal_correct
  import sar_pkg::*;
#(
  parameter int unsigned N  = SAR_BITS,
  parameter int unsigned CW = corr_width(N)
) (
  input  logic [N-1:0]  dout,
  input  logic [N-1:0]  coef [N],
  output logic [CW-1:0] corrected
);

  always_comb begin
    corrected = '0;
    for (int k = 0; k < N; k++)
      if (dout[k]) corrected += CW'(coef[k]);
  end

endmodule
