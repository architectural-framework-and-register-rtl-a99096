// tb_astable_multivibrator: checks the clock generator model against
// F = 1/(1.38 R C). With R = 18 kOhm and C = 47 uF the expected period is
// 1167.48 ms; the test measures 20 periods and the high and low times,
// each to within 1 us.
module tb_astable_multivibrator;
  timeunit 1ms;
  timeprecision 1us;

  localparam realtime EXPECT_MS = 1.38 * 18000.0 * 47.0e-6 * 1000.0;
  logic vmon;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall, t_prev_rise;

  astable_multivibrator dut (.vmon(vmon));

  initial begin
    #(EXPECT_MS * 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void near(realtime got, realtime want, string what);
    checks++;
    if (got < want - 0.001 || got > want + 0.001) begin
      failures++;
      $display("FAIL %s: %f ms, expected %f ms", what, got, want);
    end
  endfunction

  initial begin
    @(posedge vmon) t_prev_rise = $realtime;
    for (int i = 0; i < 20; i++) begin
      @(negedge vmon) t_fall = $realtime;
      @(posedge vmon) t_rise = $realtime;
      near(t_fall - t_prev_rise, EXPECT_MS / 2, "high time");
      near(t_rise - t_fall, EXPECT_MS / 2, "low time");
      near(t_rise - t_prev_rise, EXPECT_MS, "period");
      t_prev_rise = t_rise;
    end
    $display("frequency %f Hz", 1000.0 / EXPECT_MS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
