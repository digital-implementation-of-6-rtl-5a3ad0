// tb_sample_hold: self-checking testbench for the sample-and-hold.
//
// It checks that hold takes the input at the rising edge of sample and only
// then: an input that changes while sample stays high, or while sample is
// low, must not reach hold. Random levels are sampled 200 times.
module tb_sample_hold;
  localparam int N = 6;
  logic clk = 1'b0;
  logic sample;
  logic [N-1:0] vin, hold;
  int checks = 0, failures = 0;

  sample_hold #(.N(N)) dut (.clk, .sample, .vin, .hold);

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
    logic [N-1:0] v;
    sample = 1'b0;
    vin = '0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      v = N'($urandom);
      vin = v;
      sample = 1'b1;
      @(negedge clk);
      check(hold == v, $sformatf("captured %0d, expected %0d", hold, v));
      vin = ~v;                       // change while sample is still high
      @(negedge clk);
      check(hold == v, "no capture while sample stays high");
      sample = 1'b0;
      repeat (1 + $urandom_range(3)) begin
        vin = N'($urandom);           // change while sample is low
        @(negedge clk);
        check(hold == v, "hold stable while sample low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
