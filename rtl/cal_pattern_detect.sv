// cal_pattern_detect: recognises the "desired patterns" of the foreground
// calibration.
//
// A desired pattern is an output code with exactly one bit set. For such a
// code the test level that produced it is the actual weight of that bit, so
// the block flags it and names the bit; every other code is rejected and is
// not stored.
//
// Interface: dout (converter output) in; hit (dout is one-hot) and idx (the
// position of its set bit, meaningful only with hit) out. Timing:
// combinational. Keeping only codes with a single 1 follows the design; the
// bit count and priority-free encoder are the simplest circuit for it.
module cal_pattern_detect
  import sar_pkg::*;
#(
  parameter int unsigned N = SAR_BITS
) (
  input  logic [N-1:0]         dout,
  output logic                 hit,
  output logic [$clog2(N)-1:0] idx
);

  always_comb begin
    int unsigned ones;
    ones = 0;
    idx  = '0;
    for (int k = 0; k < N; k++) begin
      if (dout[k]) begin
        ones += 1;
        idx = ($clog2(N))'(k);
      end
    end
    hit = (ones == 1);
  end

endmodule
