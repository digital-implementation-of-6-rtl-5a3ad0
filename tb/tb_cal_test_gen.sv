// tb_cal_test_gen: self-checking testbench for the calibration test ramp.
//
// It checks the reset level, that the ramp only moves on step, by exactly
// one level, that last is raised at the top level and the ramp stops there,
// and that restart returns it to level 0.
module tb_cal_test_gen;
  localparam int N = 6;
  logic clk = 1'b0;
  logic rst_n, restart, step, last;
  logic [N-1:0] vt;
  int checks = 0, failures = 0;

  cal_test_gen #(.N(N)) dut (.clk, .rst_n, .restart, .step, .vt, .last);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    rst_n = 1'b0;
    restart = 1'b0;
    step = 1'b0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(vt == 0 && !last, "reset level");
    expv = 0;
    for (int i = 0; i < 400; i++) begin
      step = ($urandom_range(2) != 0);
      @(negedge clk);
      if (step && expv < 63) expv++;
      check(vt == N'(expv), $sformatf("vt %0d, expected %0d", vt, expv));
      check(last == (expv == 63), "last flag");
    end
    check(expv == 63, "ramp reached the top");
    restart = 1'b1;
    step = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    check(vt == 0 && !last, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
