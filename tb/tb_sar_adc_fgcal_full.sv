// tb_sar_adc_fgcal_full: the calibrated SAR ADC at its default parameters.
//
// With every parameter at its default (6 bits, ideal DAC) the testbench
// converts the example level 010110 and checks the trial codes it sends to
// the DAC (100000, 010000, 011000, 010100, 010110, 010111) and the result
// 010110 with its latency of 8 rising edges. It then runs one complete
// foreground calibration (641 cycles), which for an ideal DAC must measure
// the nominal weights 1, 2, 4, 8, 16, 32 for every bit, and converts all 64
// levels, for which raw and corrected codes must both equal the level.
module tb_sar_adc_fgcal_full;
  localparam int N = 6;
  logic clk = 1'b0;
  logic rst_n, go, cal_start;
  logic [5:0] vin, value, hold, result;
  logic sample, valid, cal_busy, cal_done;
  logic [8:0] corrected;
  logic [5:0] coef [6];
  logic [5:0] coef_filled;
  int checks = 0, failures = 0;

  sar_adc_fgcal dut (
    .clk, .rst_n, .go, .vin, .cal_start, .sample, .value, .hold, .valid,
    .result, .corrected, .cal_busy, .cal_done, .coef, .coef_filled
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] trials [6];
    logic [5:0] expected [6];
    int cycles;
    expected = '{6'b100000, 6'b010000, 6'b011000, 6'b010100, 6'b010110, 6'b010111};
    rst_n = 1'b0;
    go = 1'b0;
    cal_start = 1'b0;
    vin = 6'b010110;
    #12 rst_n = 1'b1;
    @(negedge clk);

    // Example conversion of 010110.
    go = 1'b1;
    @(posedge clk); #1;
    check(sample, "sample pulse");
    @(posedge clk); #1;
    check(hold == 6'b010110, "held level");
    for (int t = 0; t < N; t++) begin
      trials[t] = value;
      @(posedge clk); #1;
    end
    for (int t = 0; t < N; t++)
      check(trials[t] == expected[t], $sformatf("trial %0d: %b, expected %b", t, trials[t], expected[t]));
    check(valid && result == 6'b010110 && corrected == 9'b010110, "example result after 8 edges");

    // Full calibration.
    go = 1'b0;
    @(negedge clk);
    cal_start = 1'b1;
    @(posedge clk);
    #1 cal_start = 1'b0;
    cycles = 0;
    while (!cal_done && cycles < 2000) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    check(cycles == 1 + 64 * (N + 4), $sformatf("calibration took %0d cycles", cycles));
    check(coef_filled == 6'b111111, "every bit measured");
    for (int k = 0; k < N; k++)
      check(coef[k] == 6'(1 << k), $sformatf("coef[%0d] = %0d", k, coef[k]));

    // All levels after calibration.
    for (int v = 0; v < 64; v++) begin
      go = 1'b0;
      @(posedge clk);
      @(negedge clk);
      vin = 6'(v);
      go = 1'b1;
      cycles = 0;
      while (!valid && cycles < 50) begin
        @(posedge clk);
        cycles++;
        #1;
      end
      check(cycles == N + 2, "latency");
      check(result == 6'(v) && corrected == 9'(v), $sformatf("level %0d: raw %0d corrected %0d", v, result, corrected));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
