// tb_sar_adc_fgcal: end-to-end testbench of the calibrated SAR ADC.
//
// The converter is built with a mismatched DAC (bit weights 1, 3, 3, 9, 14,
// 29 instead of 1, 2, 4, 8, 16, 32). The testbench
//   1. converts every input level before calibration: the raw code must be
//      the reference binary search over the mismatched weights and the
//      corrected code must equal it (nominal coefficients);
//   2. runs a foreground calibration while toggling go and vin, which must be
//      ignored, and checks its length (641 cycles), every write into the
//      register file against the reference, the one-hot codes stored and
//      the other codes discarded, and the final coefficients;
//   3. converts every level again: the corrected code must be the sum of the
//      measured weights of the raw code's bits, and is compared with the
//      input level to show the calibration reduces the error;
//   4. aborts a conversion by dropping go, and recalibrates from the done
//      state.
// Each mechanism is counted and must have happened at least once.
module tb_sar_adc_fgcal;
  localparam int N = 6;
  localparam int CW = 9;
  localparam int ERR [N] = '{0, 1, -1, 1, -2, -3};
  localparam int CAL_CYCLES = 1 + 64 * (N + 4);

  logic clk = 1'b0;
  logic rst_n, go, cal_start;
  logic [N-1:0] vin, value, hold, result;
  logic sample, valid, cal_busy, cal_done;
  logic [CW-1:0] corrected;
  logic [N-1:0] coef [N];
  logic [N-1:0] coef_filled;
  int checks = 0, failures = 0;
  int exp_coef [N];
  bit exp_filled [N];

  // Mechanism counters.
  int n_cal_runs = 0, n_stored = 0, n_discarded = 0, n_conversions = 0;
  int n_corrected_differs = 0, n_aborts = 0, n_ignored_go = 0, n_recal = 0;

  sar_adc_fgcal #(.N(N), .ERR(ERR)) dut (
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

  // Reference calibration: first ramp level that converts to each one-hot code.
  function automatic void ref_calibrate();
    for (int k = 0; k < N; k++) begin
      exp_coef[k] = 1 << k;
      exp_filled[k] = 1'b0;
    end
    for (int v = 0; v < 64; v++)
      for (int k = 0; k < N; k++)
        if (ref_sar(v) == (1 << k) && !exp_filled[k]) begin
          exp_coef[k] = v;
          exp_filled[k] = 1'b1;
        end
  endfunction

  function automatic int corr_of(int code, bit calibrated);
    int s = 0;
    for (int k = 0; k < N; k++)
      if ((code & (1 << k)) != 0) s += calibrated ? exp_coef[k] : (1 << k);
    return s;
  endfunction

  // Counts writes into the register file during calibration and checks each.
  always @(posedge clk) begin
    if (dut.u_seq.state == sar_pkg::CAL_STORE) begin
      if (dut.we) begin
        n_stored++;
        checks++;
        if ((dut.result & (dut.result - 1)) != 0 || dut.result == 0 ||
            int'(dut.vt) < 0 || ref_sar(int'(dut.vt)) != int'(dut.result)) begin
          failures++;
          $display("FAIL: stored level %0d with code %b", dut.vt, dut.result);
        end
      end else begin
        n_discarded++;
      end
    end
  end

  task automatic convert(input int lvl, input bit calibrated, input int expect_latency);
    int cycles;
    go = 1'b0;
    @(posedge clk);
    @(negedge clk);
    vin = N'(lvl);
    go = 1'b1;
    cycles = 0;
    while (!valid && cycles < 50) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    n_conversions++;
    check(cycles == expect_latency, $sformatf("latency %0d, expected %0d", cycles, expect_latency));
    check(result == N'(ref_sar(lvl)), $sformatf("level %0d: raw %0d, expected %0d", lvl, result, ref_sar(lvl)));
    check(corrected == CW'(corr_of(ref_sar(lvl), calibrated)),
          $sformatf("level %0d: corrected %0d, expected %0d", lvl, corrected, corr_of(ref_sar(lvl), calibrated)));
    if (corrected != CW'(result)) n_corrected_differs++;
  endtask

  task automatic calibrate();
    int cycles;
    @(negedge clk);
    cal_start = 1'b1;
    @(posedge clk);
    #1 cal_start = 1'b0;
    cycles = 0;
    while (!cal_done && cycles < 2 * CAL_CYCLES) begin
      // go and vin from outside must not disturb the calibration
      go = 1'($urandom_range(1));
      vin = N'($urandom);
      if (go) n_ignored_go++;
      check(!valid, "valid stays low while calibrating");
      @(posedge clk);
      cycles++;
      #1;
    end
    n_cal_runs++;
    go = 1'b0;
    check(cycles == CAL_CYCLES, $sformatf("calibration took %0d cycles, expected %0d", cycles, CAL_CYCLES));
    check(!cal_busy, "calibration released the converter");
    ref_calibrate();
    for (int k = 0; k < N; k++) begin
      check(int'(coef[k]) == exp_coef[k], $sformatf("coef[%0d] %0d, expected %0d", k, coef[k], exp_coef[k]));
      check(coef_filled[k] == exp_filled[k], $sformatf("filled[%0d]", k));
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err_raw, err_cal;
    rst_n = 1'b0;
    go = 1'b0;
    cal_start = 1'b0;
    vin = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(!cal_busy && !cal_done, "idle after reset");

    // 1. Before calibration: nominal coefficients.
    for (int v = 0; v < 64; v++) convert(v, 1'b0, N + 2);

    // 2. Calibration.
    calibrate();

    // 3. After calibration: sum of measured weights; error against the input.
    err_raw = 0;
    err_cal = 0;
    for (int v = 0; v < 64; v++) begin
      convert(v, 1'b1, N + 2);
      err_raw += (int'(result) > v) ? int'(result) - v : v - int'(result);
      err_cal += (int'(corrected) > v) ? int'(corrected) - v : v - int'(corrected);
    end
    $display("total |error| over all levels: raw %0d, corrected %0d", err_raw, err_cal);
    check(err_cal < err_raw, "calibration reduces the conversion error");

    // 4. Abort, then recalibrate from the done state.
    go = 1'b0;
    @(posedge clk);
    @(negedge clk);
    vin = 6'd50;
    go = 1'b1;
    repeat (4) @(negedge clk);
    go = 1'b0;
    @(posedge clk);
    #1;
    check(!valid && result == 0, "go low aborts the conversion");
    n_aborts++;
    convert(50, 1'b1, N + 2);
    check(cal_done, "done stays high after calibration");
    calibrate();
    n_recal++;
    convert(22, 1'b1, N + 2);

    $display("mechanisms: cal_runs=%0d stored=%0d discarded=%0d conversions=%0d corrected_differs=%0d aborts=%0d ignored_go=%0d recal=%0d",
             n_cal_runs, n_stored, n_discarded, n_conversions, n_corrected_differs, n_aborts, n_ignored_go, n_recal);
    check(n_cal_runs > 0, "calibration ran");
    check(n_stored > 0, "one-hot codes stored");
    check(n_discarded > 0, "other codes discarded");
    check(n_conversions > 0, "normal conversions");
    check(n_corrected_differs > 0, "correction changed some codes");
    check(n_aborts > 0, "abort by go");
    check(n_ignored_go > 0, "go ignored while calibrating");
    check(n_recal > 0, "recalibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
