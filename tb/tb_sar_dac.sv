// tb_sar_dac: self-checking testbench for the behavioural DAC model.
//
// Two instances are checked over all 64 codes: an ideal DAC, whose output
// must equal the code, and one with per-bit mismatch, whose output must be
// the sum of 2**k + ERR[k] over the set bits, worked out here independently.
module tb_sar_dac;
  localparam int N = 6;
  localparam int ERR [N] = '{1, -1, 0, 2, -1, -3};
  logic [N-1:0] value;
  logic [N+1:0] vid, vmis;
  int checks = 0, failures = 0;

  sar_dac #(.N(N))             u_ideal (.value, .vdac(vid));
  sar_dac #(.N(N), .ERR(ERR))  u_mis   (.value, .vdac(vmis));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int c = 0; c < 64; c++) begin
      value = N'(c);
      #1;
      expv = c;
      for (int k = 0; k < N; k++) if (c & (1 << k)) expv += ERR[k];
      check(vid == (N + 2)'(c), $sformatf("ideal code %0d gave %0d", c, vid));
      check(vmis == (N + 2)'(expv), $sformatf("mismatched code %0d gave %0d, expected %0d", c, vmis, expv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
