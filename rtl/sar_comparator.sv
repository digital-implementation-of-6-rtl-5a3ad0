// sar_comparator: behavioural model of the SAR ADC comparator.
//
// The real part is an analog comparator between the held input (non-inverting
// input) and the DAC output (inverting input). Here both levels are numbers on
// the same scale; cmp is 1 when the held input is at or above the DAC level,
// 0 otherwise, so that an input exactly equal to a trial code keeps that
// code's bit and the converter returns the input code itself.
//
// Interface: vhold (N bits) and vdac (N+2 bits) in; cmp out. Timing:
// combinational. Counting equality as "above" is this model's choice; it is
// the rule under which a held 010110 converts to 010110.
module sar_comparator
  import sar_pkg::*;
#(
  parameter int unsigned N = SAR_BITS
) (
  input  logic [N-1:0] vhold,
  input  logic [N+1:0] vdac,
  output logic         cmp
);

  assign cmp = ({2'b00, vhold} >= vdac);

endmodule
