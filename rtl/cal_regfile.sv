// cal_regfile: register file holding the calibration coefficients.
//
// Entry k holds the measured weight of converter bit k: the first test level
// whose conversion gave the one-hot code with bit k set. Later writes to an
// entry that is already filled are ignored, so each entry keeps the lowest
// level, the bit's threshold. Until an entry is written it holds the nominal
// weight 2**k, so an uncalibrated converter is corrected by the identity.
//
// Interface: clk, rst_n (asynchronous, active low), clear (synchronous: back
// to nominal weights, nothing filled), we, widx, wdata in; coef (all N
// entries, read in parallel) and filled (one flag per entry) out. Timing: a
// write takes effect at the rising clk edge where we is high. Storing the
// coefficients in a register file follows the design; first-write-wins and
// nominal reset values are this design's choices.
module cal_regfile
  import sar_pkg::*;
#(
  parameter int unsigned N = SAR_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] widx,
  input  logic [N-1:0]         wdata,
  output logic [N-1:0]         coef [N],
  output logic [N-1:0]         filled
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) coef[k] <= N'(1) << k;
      filled <= '0;
    end else if (clear) begin
      for (int k = 0; k < N; k++) coef[k] <= N'(1) << k;
      filled <= '0;
    end else if (we && (int'(widx) < N) && !filled[widx]) begin
      coef[widx]   <= wdata;
      filled[widx] <= 1'b1;
    end
  end

endmodule
