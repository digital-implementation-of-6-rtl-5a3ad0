// tb_cal_correct: self-checking testbench for the output correction.
//
// For nominal coefficients the corrected value must equal the raw code; for
// random coefficient sets it must equal the sum of the coefficients of the
// set bits, computed here. Every raw code is tried with each set.
module tb_cal_correct;
  localparam int N = 6;
  localparam int CW = 9;
  logic [N-1:0] dout;
  logic [N-1:0] coef [N];
  logic [CW-1:0] corrected;
  int checks = 0, failures = 0;

  cal_correct #(.N(N)) dut (.dout, .coef, .corrected);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int set = 0; set < 20; set++) begin
      for (int k = 0; k < N; k++) coef[k] = (set == 0) ? N'(1 << k) : N'($urandom);
      if (set == 1) for (int k = 0; k < N; k++) coef[k] = '1;   // largest sum
      for (int c = 0; c < 64; c++) begin
        dout = N'(c);
        #1;
        s = 0;
        for (int k = 0; k < N; k++) if (c & (1 << k)) s += int'(coef[k]);
        checks++;
        if (corrected != CW'(s) || (set == 0 && corrected != CW'(c))) begin
          failures++;
          $display("FAIL: set %0d code %0d corrected %0d expected %0d", set, c, corrected, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
