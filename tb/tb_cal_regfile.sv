// tb_cal_regfile: self-checking testbench for the coefficient register file.
//
// It checks the nominal reset values (2**k), that the first write to an
// entry is kept and later writes to it are ignored, that an unwritten entry
// keeps its nominal value, that writes with we low do nothing, and that
// clear restores the nominal weights.
module tb_cal_regfile;
  localparam int N = 6;
  logic clk = 1'b0;
  logic rst_n, clear, we;
  logic [2:0] widx;
  logic [N-1:0] wdata;
  logic [N-1:0] coef [N];
  logic [N-1:0] filled;
  logic [N-1:0] model [N];
  logic [N-1:0] mfilled;
  int checks = 0, failures = 0;

  cal_regfile #(.N(N)) dut (.clk, .rst_n, .clear, .we, .widx, .wdata, .coef, .filled);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compare(string when);
    check(filled == mfilled, $sformatf("%s: filled %b, expected %b", when, filled, mfilled));
    for (int k = 0; k < N; k++)
      check(coef[k] == model[k], $sformatf("%s: coef[%0d] %0d, expected %0d", when, k, coef[k], model[k]));
  endtask

  task automatic model_reset();
    for (int k = 0; k < N; k++) model[k] = N'(1 << k);
    mfilled = '0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    clear = 1'b0;
    we = 1'b0;
    widx = '0;
    wdata = '0;
    model_reset();
    #12 rst_n = 1'b1;
    @(negedge clk);
    compare("after reset");
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 40; i++) begin
        we = ($urandom_range(1) == 1);
        widx = 3'($urandom_range(4));      // entry 5 is never written
        wdata = N'($urandom);
        @(negedge clk);
        if (we && !mfilled[widx]) begin
          model[widx] = wdata;
          mfilled[widx] = 1'b1;
        end
        compare("write");
      end
      check(mfilled[4:0] != 0, "some entries written");
      we = 1'b0;
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      model_reset();
      compare("clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
