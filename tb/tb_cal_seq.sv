// tb_cal_seq: self-checking testbench for the calibration sequencer.
//
// The testbench stands in for the converter, the ramp and the pattern
// detector: it answers go with adc_valid after a random number of cycles,
// chooses hit at random and raises last when its own ramp count reaches the
// top (16 levels here). It checks the start cycle (busy, restart, clear, go
// low), that go stays high until adc_valid, the single store cycle after
// each conversion (go low, step, we equal to hit), done after the last
// level, and that a second cal_start from the done state runs again.
module tb_cal_seq;
  localparam int LEVELS = 16;
  logic clk = 1'b0;
  logic rst_n, cal_start, adc_valid, hit, last;
  logic busy, go, restart, clear, step, we, done;
  int checks = 0, failures = 0;
  int level;

  cal_seq dut (.clk, .rst_n, .cal_start, .adc_valid, .hit, .last,
               .busy, .go, .restart, .clear, .step, .we, .done);

  always #5 clk = ~clk;
  assign last = (level == LEVELS - 1);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
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
    int wait_cycles, stores;
    rst_n = 1'b0;
    cal_start = 1'b0;
    adc_valid = 1'b0;
    hit = 1'b0;
    level = 0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !go && !done && !we && !step, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      cal_start = 1'b1;
      @(negedge clk);
      cal_start = 1'b0;
      check(busy && restart && clear && !go && !done, "start cycle");
      level = 0;
      stores = 0;
      for (int l = 0; l < LEVELS; l++) begin
        @(negedge clk);
        wait_cycles = $urandom_range(8, 2);
        for (int c = 0; c < wait_cycles; c++) begin
          check(busy && go && !step && !we && !restart, "go held during conversion");
          @(negedge clk);
        end
        check(go, "go still high at valid");
        adc_valid = 1'b1;
        hit = ($urandom_range(1) == 1);
        @(negedge clk);
        adc_valid = 1'b0;
        check(busy && !go && step, "store cycle: go low, step");
        check(we == hit, "we follows hit in the store cycle");
        stores++;
        if (l < LEVELS - 1) begin
          @(posedge clk);
          #1;
          level++;
        end
      end
      @(negedge clk);
      check(done && !busy && !go && !we, "done after the last level");
      check(stores == LEVELS, "one store per level");
      repeat (3) @(negedge clk);
      check(done, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
