// sar_adc: the complete 6-bit successive-approximation ADC.
//
// It connects the SAR controller, the sample-and-hold, the DAC and the
// comparator as a closed loop: the controller samples the input, then drives
// one trial code per cycle into the DAC, reads the comparator and keeps or
// clears the trial bit. The input is an N-bit code standing for the analog
// level; the DAC and comparator are behavioural models, with the DAC's
// per-bit mismatch set by ERR.
//
// Interface: clk, go, vin in; sample, value, hold, result, valid out (value
// and hold are the DAC code and held level, brought out for observation).
// Timing: as the controller's: valid rises N + 2 rising clk edges after the
// first edge that sees go high, and result holds until go falls.
module sar_adc
  import sar_pkg::*;
#(
  parameter int unsigned N = SAR_BITS,
  parameter int          ERR [N] = '{default: 0}
) (
  input  logic         clk,
  input  logic         go,
  input  logic [N-1:0] vin,
  output logic         sample,
  output logic         valid,
  output logic [N-1:0] result,
  output logic [N-1:0] value,
  output logic [N-1:0] hold
);

  logic         cmp;
  logic [N+1:0] vdac;

  saradc #(.N(N)) u_ctrl (
    .clk, .go, .cmp, .sample, .valid, .result, .value
  );

  sample_hold #(.N(N)) u_sh (
    .clk, .sample, .vin, .hold
  );

  sar_dac #(.N(N), .ERR(ERR)) u_dac (
    .value, .vdac
  );

  sar_comparator #(.N(N)) u_cmp (
    .vhold(hold), .vdac, .cmp
  );

endmodule
