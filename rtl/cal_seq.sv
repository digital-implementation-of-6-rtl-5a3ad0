// cal_seq: sequencer of the foreground calibration.
//
// When calibration is requested it takes the converter over from normal
// operation, feeds it every level of the test ramp in turn, and after each
// conversion writes the test level into the coefficient register file if the
// converter returned a one-hot code. After the top level of the ramp it
// hands the converter back and reports that the coefficients are ready.
//
// Interface: clk, rst_n (asynchronous, active low), cal_start (request a
// calibration run; taken in CAL_IDLE or CAL_DONE), adc_valid (converter has
// finished), hit (the finished code is one-hot) and last (the ramp is at its
// top level) in. Out: busy (the converter belongs to the calibration), go
// (converter go while busy), restart and clear (reset the ramp and the
// register file), step (next ramp level), we (store the current level) and
// done.
//
// Timing per test level: go is high in CAL_CONV until adc_valid, then low
// for the single CAL_STORE cycle, which resets the converter before the next
// level; one level therefore takes N + 4 clock cycles and a whole run
// 1 + 2**N * (N + 4) cycles (641 for N = 6). The design states only that test
// samples are converted and the one-hot results stored; this sequencing is
// this design's own.
module cal_seq
  import sar_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic cal_start,
  input  logic adc_valid,
  input  logic hit,
  input  logic last,
  output logic busy,
  output logic go,
  output logic restart,
  output logic clear,
  output logic step,
  output logic we,
  output logic done
);

  cal_state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CAL_IDLE;
    end else begin
      unique case (state)
        CAL_IDLE:  if (cal_start) state <= CAL_START;
        CAL_START: state <= CAL_CONV;
        CAL_CONV:  if (adc_valid) state <= CAL_STORE;
        CAL_STORE: state <= last ? CAL_DONE : CAL_CONV;
        CAL_DONE:  if (cal_start) state <= CAL_START;
        default:   state <= CAL_IDLE;
      endcase
    end
  end

  assign busy    = (state == CAL_START) || (state == CAL_CONV) || (state == CAL_STORE);
  assign go      = (state == CAL_CONV);
  assign restart = (state == CAL_START);
  assign clear   = (state == CAL_START);
  assign step    = (state == CAL_STORE);
  assign we      = (state == CAL_STORE) && hit;
  assign done    = (state == CAL_DONE);

endmodule
