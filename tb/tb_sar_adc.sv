// tb_sar_adc: self-checking testbench for the closed-loop SAR ADC.
//
// Two converters run side by side on the same input: one with an ideal DAC
// and one with a mismatched DAC. For every input level the ideal one must
// return the level itself, and the mismatched one the code that a
// reference binary search over the mismatched weights (computed here)
// gives. The latency of valid (N + 2 rising edges after the first that sees
// go high) is checked on every conversion, and the held level on the
// example of a held 010110.
module tb_sar_adc;
  localparam int N = 6;
  localparam int ERR [N] = '{0, 1, -1, 1, -2, -3};
  logic clk = 1'b0;
  logic go;
  logic [N-1:0] vin;
  logic s_i, v_i, s_m, v_m;
  logic [N-1:0] r_i, val_i, h_i, r_m, val_m, h_m;
  int checks = 0, failures = 0;

  sar_adc #(.N(N))            u_ideal (.clk, .go, .vin, .sample(s_i), .valid(v_i),
                                       .result(r_i), .value(val_i), .hold(h_i));
  sar_adc #(.N(N), .ERR(ERR)) u_mis   (.clk, .go, .vin, .sample(s_m), .valid(v_m),
                                       .result(r_m), .value(val_m), .hold(h_m));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int weight_sum(int code);
    int s = 0;
    for (int k = 0; k < N; k++) if ((code & (1 << k)) != 0) s += (1 << k) + ERR[k];
    return s < 0 ? 0 : s;
  endfunction

  function automatic int ref_sar(int lvl);
    int code = 0;
    for (int k = N - 1; k >= 0; k--)
      if (lvl >= weight_sum(code | (1 << k))) code |= (1 << k);
    return code;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, differ;
    go = 1'b0;
    vin = '0;
    differ = 0;
    for (int v = 0; v < 64; v++) begin
      go = 1'b0;
      @(posedge clk);
      @(negedge clk);
      vin = N'(v);
      go = 1'b1;
      cycles = 0;
      while (!v_i && cycles < 50) begin
        @(posedge clk);
        cycles++;
        #1;
        vin = N'($urandom);   // the input may move once it has been sampled
        if (cycles == 1) vin = N'(v);
      end
      check(cycles == N + 2, $sformatf("latency %0d, expected %0d", cycles, N + 2));
      check(v_m, "both converters finish together");
      check(h_i == N'(v), "held level");
      check(r_i == N'(v), $sformatf("ideal: level %0d gave %0d", v, r_i));
      check(r_m == N'(ref_sar(v)), $sformatf("mismatched: level %0d gave %0d, expected %0d", v, r_m, ref_sar(v)));
      if (r_m != r_i) differ++;
    end
    check(differ > 0, "mismatch changes some codes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
