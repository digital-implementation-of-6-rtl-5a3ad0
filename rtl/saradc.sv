// saradc: the successive-approximation controller of the SAR ADC.
//
// It runs a binary search over an N-bit code, MSB first, against an external
// DAC and comparator. The interface is the one of the controller block:
// clk, go and cmp in; sample, value, result and valid out.
//
//   go      low: the controller is held in reset (result cleared, valid low).
//           high: one sample-and-convert cycle is started and, when it ends,
//           the result is held until go falls again.
//   sample  high for exactly one clock cycle; the sample-and-hold captures
//           the input on its rising edge.
//   value   code driven to the DAC: the bits decided so far with the bit
//           under test set (100000 first, for N = 6).
//   cmp     comparator decision for the current value: 1 when the held
//           input is at or above the DAC output, so the trial bit is kept.
//   result  the converted code; valid is high while it is final.
//
// Timing: at the first rising clock edge that sees go high the controller
// leaves IDLE and raises sample for one cycle; then N conversion cycles
// follow, one bit per cycle; valid rises N + 2 rising edges after the first
// one that saw go high (8 for N = 6) and stays high until go falls.
// The binary search, go/valid/sample behaviour and the N compare cycles
// follow the design; the extra sample cycle, the state encoding and the
// synchronous reset through go are this implementation's choices. There is
// no reset pin: holding go low for one clock cycle resets the controller.
module saradc
  import sar_pkg::*;
#(
  parameter int unsigned N = SAR_BITS
) (
  input  logic         clk,
  input  logic         go,
  input  logic         cmp,
  output logic         sample,
  output logic         valid,
  output logic [N-1:0] result,
  output logic [N-1:0] value
);

  sar_state_e   state;
  logic [N-1:0] mask;   // one-hot: the bit under test during SAR_CONV

  always_ff @(posedge clk) begin
    if (!go) begin
      state  <= SAR_IDLE;
      result <= '0;
      mask   <= '0;
    end else begin
      unique case (state)
        SAR_IDLE: begin
          state <= SAR_SAMPLE;
        end
        SAR_SAMPLE: begin
          state  <= SAR_CONV;
          result <= '0;
          mask   <= N'(1) << (N - 1);
        end
        SAR_CONV: begin
          if (cmp) result <= result | mask;
          mask <= mask >> 1;
          if (mask[0]) state <= SAR_DONE;
        end
        SAR_DONE: begin
          state <= SAR_DONE;
        end
      endcase
    end
  end

  assign sample = (state == SAR_SAMPLE);
  assign valid  = (state == SAR_DONE);
  assign value  = result | mask;

endmodule
