// tb_saradc: self-checking testbench for the SAR controller (saradc).
//
// The testbench plays the DAC and the comparator itself: cmp is 1 when the
// level it holds is at or above the controller's value. It checks the
// trial-code sequence for a held 010110 (100000, 010000, 011000, 010100,
// 010110, 010111, result 010110), the one-cycle sample pulse, the latency of
// valid (N + 2 rising edges after the first edge that sees go high), all 64
// input levels, that the result stays while go is high, and that dropping go
// in the middle of a conversion resets the controller.
module tb_saradc;
  localparam int N = 6;
  logic clk = 1'b0;
  logic go, cmp, sample, valid;
  logic [N-1:0] result, value, level;
  int checks = 0, failures = 0;

  saradc #(.N(N)) dut (.clk, .go, .cmp, .sample, .valid, .result, .value);

  always #5 clk = ~clk;
  assign cmp = (level >= value);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Runs one conversion of lvl; returns the code and the cycles to valid.
  task automatic convert(input logic [N-1:0] lvl, output logic [N-1:0] code,
                         output int cycles, output int samples);
    level = lvl;
    go = 1'b0;
    @(posedge clk);
    @(negedge clk);
    go = 1'b1;
    cycles = 0;
    samples = 0;
    while (!valid && cycles < 50) begin
      @(posedge clk);
      cycles++;
      #1;
      if (sample) samples++;
    end
    code = result;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] code;
    logic [N-1:0] trace [6];
    logic [N-1:0] exp_trace [6];
    int cycles, samples, t;
    go = 1'b0;
    level = '0;
    repeat (2) @(negedge clk);
    check(!valid && !sample && result == 0, "reset by go low");

    // Trial sequence for 010110.
    exp_trace = '{6'b100000, 6'b010000, 6'b011000, 6'b010100, 6'b010110, 6'b010111};
    level = 6'b010110;
    @(negedge clk);
    go = 1'b1;
    @(posedge clk); #1;
    check(sample, "sample high after first edge with go");
    @(posedge clk); #1;
    check(!sample, "sample lasts one cycle");
    for (t = 0; t < 6; t++) begin
      trace[t] = value;
      check(!valid, "valid low during conversion");
      @(posedge clk); #1;
    end
    for (t = 0; t < 6; t++)
      check(trace[t] == exp_trace[t], $sformatf("trial %0d: %b, expected %b", t, trace[t], exp_trace[t]));
    check(valid && result == 6'b010110, $sformatf("result %b, expected 010110", result));
    repeat (5) @(posedge clk);
    #1 check(valid && result == 6'b010110, "result held while go high");

    // Every level; latency N + 2.
    for (int v = 0; v < 64; v++) begin
      convert(N'(v), code, cycles, samples);
      check(code == N'(v), $sformatf("level %0d converted to %0d", v, code));
      check(cycles == N + 2, $sformatf("latency %0d, expected %0d", cycles, N + 2));
      check(samples == 1, "one sample pulse per conversion");
    end

    // Abort in the middle of a conversion.
    level = 6'd45;
    go = 1'b0;
    @(posedge clk);
    @(negedge clk);
    go = 1'b1;
    repeat (4) @(negedge clk);
    go = 1'b0;
    @(posedge clk);
    @(negedge clk);
    check(!valid && result == 0 && value == 0, "go low mid-conversion resets");
    go = 1'b1;
    repeat (N + 2) @(negedge clk);
    check(valid && result == 6'd45, "conversion after abort");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
