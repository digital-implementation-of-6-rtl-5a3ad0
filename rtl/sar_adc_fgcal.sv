// sar_adc_fgcal: 6-bit SAR ADC with foreground calibration (top level).
//
// Normal operation: the user drives go and the input level vin; the SAR ADC
// converts vin in N compare cycles and presents the raw code (result) and
// the calibrated code (corrected) while valid is high. corrected is the sum
// of the stored weights of the bits set in result.
//
// Foreground calibration: a pulse on cal_start (in clock cycles where no
// calibration is running) makes the calibration take the converter over. The
// test ramp generator supplies every input level in turn; each conversion
// result that has exactly one bit set is recognised by the pattern detector
// and the test level that caused it is written to the register file as the
// actual weight of that bit (the first such level only). When the ramp has
// been converted, cal_done rises and normal operation resumes, now
// corrected with the measured weights. Until a calibration has run, the
// register file holds the nominal weights and corrected equals result.
//
// Interface: clk; rst_n, asynchronous active-low reset of the calibration
// logic (the converter itself is reset by holding go low); go, vin, cal_start
// in. Out: sample, value and hold (converter internals, for observation),
// valid, result, corrected, cal_busy, cal_done, coef and coef_filled (the
// register file). While cal_busy is high go and vin are ignored and valid
// stays low.
//
// Timing: a normal conversion raises valid N + 2 rising edges after the
// first edge that sees go high; a calibration run takes
// 1 + 2**N * (N + 4) cycles (641 for N = 6). ERR sets the mismatch of the
// behavioural DAC model in LSBs per bit (default: an ideal DAC).
module sar_adc_fgcal
  import sar_pkg::*;
#(
  parameter int unsigned N  = SAR_BITS,
  parameter int          ERR [N] = '{default: 0},
  parameter int unsigned CW = corr_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  input  logic [N-1:0]  vin,
  input  logic          cal_start,
  output logic          sample,
  output logic [N-1:0]  value,
  output logic [N-1:0]  hold,
  output logic          valid,
  output logic [N-1:0]  result,
  output logic [CW-1:0] corrected,
  output logic          cal_busy,
  output logic          cal_done,
  output logic [N-1:0]  coef [N],
  output logic [N-1:0]  coef_filled
);

  logic                 adc_go, adc_valid;
  logic [N-1:0]         adc_vin, vt;
  logic                 seq_go, restart, clear, step, we, last, hit;
  logic [$clog2(N)-1:0] idx;

  assign adc_go  = cal_busy ? seq_go : go;
  assign adc_vin = cal_busy ? vt     : vin;
  assign valid   = adc_valid && !cal_busy;

  sar_adc #(.N(N), .ERR(ERR)) u_adc (
    .clk, .go(adc_go), .vin(adc_vin), .sample, .valid(adc_valid),
    .result, .value, .hold
  );

  cal_seq u_seq (
    .clk, .rst_n, .cal_start, .adc_valid, .hit, .last,
    .busy(cal_busy), .go(seq_go), .restart, .clear, .step, .we,
    .done(cal_done)
  );

  cal_test_gen #(.N(N)) u_tgen (
    .clk, .rst_n, .restart, .step, .vt, .last
  );

  cal_pattern_detect #(.N(N)) u_pat (
    .dout(result), .hit, .idx
  );

  cal_regfile #(.N(N)) u_rf (
    .clk, .rst_n, .clear, .we, .widx(idx), .wdata(vt),
    .coef, .filled(coef_filled)
  );

  cal_correct #(.N(N), .CW(CW)) u_corr (
    .dout(result), .coef, .corrected
  );

endmodule
