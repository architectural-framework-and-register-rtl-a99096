// tb_eyewear_soc: end-to-end test of the eyewear chip at its full size
// (13-bit timer, 7200-second period, 18 kOhm / 47 uF clock generator).
//
// The clock comes from the chip's own multivibrator model. The test drives
// the SOS button, the impact sensor, the phone's alarm and reset codes and
// the Reset_pin, and lets the timer run through two full two-hour periods.
// Every clock it compares bt_tx_code, beep and screen_time with a reference
// model built from the rules of the design. It counts each mechanism:
// SOS code sent, impact code sent, phone alarm, phone reset restarting the
// timer, timer expiry beep, Reset_pin silencing the alarm; a mechanism that
// never happened counts as a failure. It also checks the clock period and
// that the expiry beep comes exactly 7200 clocks after reset.
module tb_eyewear_soc;
  timeunit 1ms;
  timeprecision 1us;
  import eyewear_pkg::*;

  localparam int unsigned TERM = 7200;
  localparam realtime PERIOD_MS = 1.38 * 18000.0 * 47.0e-6 * 1000.0;

  logic     rst_n = 1, push_button = 0, impact_signal = 0, reset_pin = 0;
  rx_code_e bt_rx_code = RX_NONE;
  tx_code_e bt_tx_code;
  logic     beep, clk_pin;
  logic [12:0] screen_time;

  eyewear_soc dut (.*);

  int checks = 0, failures = 0;
  int n_sos = 0, n_impact = 0, n_phone_alarm = 0, n_phone_reset = 0;
  int n_timer_beep = 0, n_pin_clear = 0;
  int unsigned ref_count = 0, cycle = 0;
  logic ref_beep = 0;
  realtime t_last_edge = 0;

  initial begin
    #(PERIOD_MS * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endfunction

  // One clock: apply inputs just after a falling edge, advance the reference
  // model at the rising edge, compare just after it.
  task automatic step(logic pb, logic imp, rx_code_e code, logic rpin);
    logic [1:0] exp_tx;
    logic expired, restart;
    @(negedge clk_pin);
    push_button = pb; impact_signal = imp; bt_rx_code = code; reset_pin = rpin;
    #1;
    exp_tx = pb ? 2'b10 : (imp ? 2'b01 : 2'b00);
    check(bt_tx_code == tx_code_e'(exp_tx), $sformatf("bt_tx_code %b expected %b", bt_tx_code, exp_tx));
    if (pb) n_sos++;
    else if (imp) n_impact++;
    @(posedge clk_pin);
    if (cycle > 0) check((($realtime - t_last_edge) - PERIOD_MS) < 0.002 &&
                         (PERIOD_MS - ($realtime - t_last_edge)) < 0.002, "clock period");
    t_last_edge = $realtime;
    cycle++;
    restart = (code == RX_RESET);
    expired = !restart && (ref_count == TERM - 1);
    ref_count = (restart || ref_count == TERM - 1) ? 0 : ref_count + 1;
    if (code == RX_ALARM || expired) begin
      if (expired) n_timer_beep++;
      if (code == RX_ALARM) n_phone_alarm++;
      ref_beep = 1;
    end else if (rpin || restart) begin
      if (ref_beep && rpin) n_pin_clear++;
      ref_beep = 0;
    end
    if (restart) n_phone_reset++;
    #1;
    check(screen_time == 13'(ref_count), $sformatf("screen_time %0d expected %0d", screen_time, ref_count));
    check(beep == ref_beep, $sformatf("beep %b expected %b", beep, ref_beep));
  endtask

  task automatic idle(int n);
    repeat (n) step(0, 0, RX_NONE, 0);
  endtask

  initial begin
    int unsigned first_beep;
    #0.1 rst_n = 0;
    #10 rst_n = 1;
    // Published scenario: reset code, alarm code, switch press, impact.
    step(0, 0, RX_RESET, 0);
    step(0, 0, RX_ALARM, 0);
    idle(3);
    check(beep, "phone alarm holds the beep");
    step(1, 0, RX_NONE, 0);
    idle(1);
    step(0, 1, RX_NONE, 0);
    step(1, 1, RX_NONE, 0);
    step(0, 0, RX_NONE, 1);           // Reset_pin silences the alarm
    check(!beep, "Reset_pin silences the beep");
    // Phone reset in mid-period restarts the timer.
    idle(500);
    step(0, 0, RX_RESET, 0);
    check(screen_time == 0, "phone reset restarts the timer");
    // Now run two full timer periods with random button and impact activity.
    first_beep = 0;
    for (int i = 0; i < 2 * TERM + 10; i++) begin
      logic was;
      was = beep;
      step(($urandom % 97) == 0, ($urandom % 89) == 0, RX_NONE,
           beep && (($urandom % 50) == 0));
      if (!was && beep && first_beep == 0) first_beep = i + 1;
    end
    check(first_beep == TERM, $sformatf("first expiry beep after %0d clocks, expected %0d", first_beep, TERM));
    check(n_sos > 0,         "SOS code never sent");
    check(n_impact > 0,      "impact code never sent");
    check(n_phone_alarm > 0, "phone alarm never raised");
    check(n_phone_reset > 1, "phone reset never happened");
    check(n_timer_beep >= 2, "timer expiry beep did not happen twice");
    check(n_pin_clear > 0,   "Reset_pin never silenced the alarm");
    $display("mechanisms: sos=%0d impact=%0d phone_alarm=%0d phone_reset=%0d timer_beep=%0d pin_clear=%0d",
             n_sos, n_impact, n_phone_alarm, n_phone_reset, n_timer_beep, n_pin_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
