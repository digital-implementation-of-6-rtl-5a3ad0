// tb_sar_comparator: self-checking testbench for the comparator model.
//
// It checks every held level against every DAC level in the 8-bit DAC range:
// cmp must be 1 exactly when the held level is at or above the DAC level.
module tb_sar_comparator;
  localparam int N = 6;
  logic [N-1:0] vhold;
  logic [N+1:0] vdac;
  logic cmp;
  int checks = 0, failures = 0;

  sar_comparator #(.N(N)) dut (.vhold, .vdac, .cmp);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 64; h++)
      for (int d = 0; d < 256; d++) begin
        vhold = N'(h);
        vdac  = 8'(d);
        #1;
        checks++;
        if (cmp !== (h >= d)) begin
          failures++;
          $display("FAIL: hold %0d dac %0d cmp %0b", h, d, cmp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
