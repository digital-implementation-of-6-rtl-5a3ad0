// tb_cal_pattern_detect: self-checking testbench for the one-hot pattern
// detector.
//
// Over all 64 codes, hit must be 1 exactly for the six one-hot codes, and
// idx must then give the position of the set bit.
module tb_cal_pattern_detect;
  localparam int N = 6;
  logic [N-1:0] dout;
  logic hit;
  logic [2:0] idx;
  int checks = 0, failures = 0;

  cal_pattern_detect #(.N(N)) dut (.dout, .hit, .idx);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, pos, hits;
    hits = 0;
    for (int c = 0; c < 64; c++) begin
      dout = N'(c);
      #1;
      ones = 0;
      pos = 0;
      for (int k = 0; k < N; k++) if (c & (1 << k)) begin ones++; pos = k; end
      check(hit == (ones == 1), $sformatf("code %b hit %0b", dout, hit));
      if (ones == 1) begin
        hits++;
        check(idx == 3'(pos), $sformatf("code %b idx %0d", dout, idx));
      end
    end
    check(hits == N, "six one-hot codes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
