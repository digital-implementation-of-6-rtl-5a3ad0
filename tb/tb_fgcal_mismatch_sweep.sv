// tb_fgcal_mismatch_sweep: foreground calibration under several DAC
// mismatch profiles.
//
// Five calibrated converters, each with its own DAC error set (bit weights
// below nominal, above nominal, mixed, a large MSB error, and ideal), are
// calibrated at the same time from one cal_start and then convert every
// input level. For each one the testbench computes, independently, the
// binary search over the mismatched weights, the coefficients that a
// first-hit ramp calibration must measure (nominal where a one-hot code never
// appears), and the corrected code; all are compared. It also reports the
// summed absolute error of raw and corrected codes against the input level
// and checks that the calibration does not make it worse for any profile.
module tb_fgcal_mismatch_sweep;
  localparam int N = 6;
  localparam int P = 5;
  // Error of bit k in profile p is ERRS[p][k]. Rows are listed from
  // profile 4 (ideal) down to profile 0, bit 5 leftmost in each row.
  localparam logic signed [P-1:0][N-1:0][7:0] ERRS = '{
    '{ 8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0},
    '{-8'sd6,  8'sd0,  8'sd0,  8'sd0,  8'sd0,  8'sd0},
    '{-8'sd2,  8'sd2, -8'sd2,  8'sd1, -8'sd1,  8'sd1},
    '{ 8'sd3,  8'sd2,  8'sd1,  8'sd1,  8'sd1,  8'sd0},
    '{-8'sd3, -8'sd2, -8'sd1, -8'sd1, -8'sd1,  8'sd0}
  };

  logic clk = 1'b0;
  logic rst_n, go, cal_start;
  logic [N-1:0] vin;
  logic [P-1:0] valid, cal_done;
  logic [N-1:0] result [P];
  logic [8:0] corrected [P];
  logic [N-1:0] coef [P][N];
  logic [N-1:0] filled [P];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < P; g++) begin : g_adc
    logic [N-1:0] value, hold;
    logic sample, busy;
    localparam int ERR_G [N] = '{int'(signed'(ERRS[g][0])), int'(signed'(ERRS[g][1])),
                                 int'(signed'(ERRS[g][2])), int'(signed'(ERRS[g][3])),
                                 int'(signed'(ERRS[g][4])), int'(signed'(ERRS[g][5]))};
    sar_adc_fgcal #(.N(N), .ERR(ERR_G)) dut (
      .clk, .rst_n, .go, .vin, .cal_start, .sample, .value, .hold,
      .valid(valid[g]), .result(result[g]), .corrected(corrected[g]),
      .cal_busy(busy), .cal_done(cal_done[g]), .coef(coef[g]),
      .coef_filled(filled[g])
    );
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int weight_sum(int p, int code);
    int s = 0;
    for (int k = 0; k < N; k++) if ((code & (1 << k)) != 0) s += (1 << k) + int'(signed'(ERRS[p][k]));
    return s < 0 ? 0 : s;
  endfunction

  function automatic int ref_sar(int p, int lvl);
    int code = 0;
    for (int k = N - 1; k >= 0; k--)
      if (lvl >= weight_sum(p, code | (1 << k))) code |= (1 << k);
    return code;
  endfunction

  function automatic int ref_coef(int p, int k);
    for (int v = 0; v < 64; v++) if (ref_sar(p, v) == (1 << k)) return v;
    return 1 << k;
  endfunction

  function automatic bit ref_found(int p, int k);
    for (int v = 0; v < 64; v++) if (ref_sar(p, v) == (1 << k)) return 1'b1;
    return 1'b0;
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, c, err_raw [P], err_cal [P];
    rst_n = 1'b0;
    go = 1'b0;
    cal_start = 1'b0;
    vin = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    cycles = 0;
    while (cal_done != '1 && cycles < 2000) begin
      @(negedge clk);
      cycles++;
    end
    check(cal_done == '1, "every converter finished calibrating");
    for (int p = 0; p < P; p++) begin
      err_raw[p] = 0;
      err_cal[p] = 0;
      for (int k = 0; k < N; k++)
        check(filled[p][k] == ref_found(p, k), $sformatf("profile %0d filled[%0d]", p, k));
      for (int k = 0; k < N; k++)
        check(int'(coef[p][k]) == ref_coef(p, k),
              $sformatf("profile %0d coef[%0d] = %0d, expected %0d", p, k, coef[p][k], ref_coef(p, k)));
    end
    for (int v = 0; v < 64; v++) begin
      go = 1'b0;
      @(negedge clk);
      vin = N'(v);
      go = 1'b1;
      repeat (N + 2) @(negedge clk);
      check(valid == '1, "all valid after 8 edges");
      for (int p = 0; p < P; p++) begin
        int s;
        c = ref_sar(p, v);
        s = 0;
        for (int k = 0; k < N; k++) if ((c & (1 << k)) != 0) s += ref_coef(p, k);
        check(int'(result[p]) == c, $sformatf("profile %0d level %0d raw %0d, expected %0d", p, v, result[p], c));
        check(int'(corrected[p]) == s, $sformatf("profile %0d level %0d corrected %0d, expected %0d", p, v, corrected[p], s));
        err_raw[p] += (c > v) ? c - v : v - c;
        err_cal[p] += (s > v) ? s - v : v - s;
      end
    end
    for (int p = 0; p < P; p++) begin
      $display("profile %0d: summed |error| raw %0d, corrected %0d", p, err_raw[p], err_cal[p]);
      check(err_cal[p] <= err_raw[p], $sformatf("profile %0d: calibration made the error worse", p));
    end
    check(err_raw[P-1] == 0 && err_cal[P-1] == 0, "ideal DAC converts without error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
