// sample_hold: digital stand-in for the sample-and-hold circuit of the SAR
// ADC.
//
// The converter input is an N-bit code that represents the analog input
// level. The block captures it when the controller's sample signal rises and
// holds it, unchanged, for the comparator during the whole conversion.
//
// Interface: clk, sample (from the controller), vin (input level) in; hold
// out. Timing: the rising edge of sample is detected in the clk domain, so
// hold takes vin as it is at the first rising clk edge at which sample is
// high, and is valid from then until the next rising edge of sample.
// Capturing on the rising edge of sample follows the design; doing it
// synchronously to clk is this implementation's choice.
module sample_hold
  import sar_pkg::*;
#(
  parameter int unsigned N = SAR_BITS
) (
  input  logic         clk,
  input  logic         sample,
  input  logic [N-1:0] vin,
  output logic [N-1:0] hold
);

  logic sample_q;

  always_ff @(posedge clk) begin
    sample_q <= sample;
    if (sample && !sample_q) hold <= vin;
  end

endmodule
