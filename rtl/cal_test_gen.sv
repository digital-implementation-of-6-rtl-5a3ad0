// cal_test_gen: test input signal for the foreground calibration.
//
// It produces the known test samples that are converted during calibration:
// an ascending ramp that visits every input level 0, 1, ..., 2**N - 1 once.
// Because the ramp rises one level at a time, the first level at which the
// converter returns a given code is that code's actual threshold, which is
// what the calibration stores.
//
// Interface: clk, rst_n (asynchronous, active low), restart (synchronous:
// back to level 0) and step (advance to the next level) in; vt (the current
// test level) and last (vt is the top level) out. Timing: vt changes at the
// rising clk edge after step; it stops at the top level. Using a full
// single-step ramp as the test signal is this design's choice.
module cal_test_gen
  import sar_pkg::*;
#(
  parameter int unsigned N = SAR_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         restart,
  input  logic         step,
  output logic [N-1:0] vt,
  output logic         last
);

  assign last = &vt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       vt <= '0;
    else if (restart) vt <= '0;
    else if (step && !last) vt <= vt + 1'b1;
  end

endmodule
