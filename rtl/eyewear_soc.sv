// eyewear_soc: top of the smart-eyewear chip.
//
// The chip reminds the wearer to rest the eyes every two hours, lets the phone
// make the spectacles beep ("find my device"), and sends panic codes to the
// phone when the SOS button is pressed or the frame suffers an impact.
//
// Inside: the astable multivibrator makes the ~1 Hz clock (brought out on
// `clk_pin`); screen_timer counts 7200 clocks; bt_logic decodes the code from
// the Bluetooth module and encodes the panic code to it; alarm_system holds
// the beep on. A 2-input OR joins the phone's alarm request and the timer
// expiry into the alarm, as in the published architecture. The reset code
// from the phone restarts the timer and silences the alarm; Reset_pin also
// silences it. Those two uses of reset, and the power-on reset `rst_n`, are
// this design's choices. The Bluetooth module, impact sensor and sound
// generator are outside this RTL: their signals are ports.
//
// Timing: bt_tx_code follows push_button / impact_signal combinationally;
// beep rises one clock after a 01 code or timer expiry.
module eyewear_soc
  import eyewear_pkg::*;
#(
  // 7200 s = 2 h needs 13 bits (7200 = 13'b1110000100000).
  parameter int unsigned TIMER_WIDTH    = 13,
  parameter int unsigned TIMER_TERMINAL = 7200,
  parameter int unsigned R_OHM          = 18000,
  parameter int unsigned C_UF           = 47
) (
  input  logic                     rst_n,
  input  logic                     push_button,
  input  logic                     impact_signal,
  input  rx_code_e                 bt_rx_code,
  output tx_code_e                 bt_tx_code,
  input  logic                     reset_pin,
  output logic                     beep,
  output logic                     clk_pin,
  output logic [TIMER_WIDTH-1:0]   screen_time
);
  timeunit 1ms;
  timeprecision 1us;

  logic clk;
  logic bt_alarm, bt_reset;
  logic timer_expired;
  logic alarm_trigger, alarm_clear;

  astable_multivibrator #(.R_OHM(R_OHM), .C_UF(C_UF)) u_clkgen (.vmon(clk));
  assign clk_pin = clk;

  bt_logic u_bt_logic (
    .switch_press (push_button),
    .impact_signal(impact_signal),
    .code         (bt_rx_code),
    .bt_code      (bt_tx_code),
    .alarm        (bt_alarm),
    .reset        (bt_reset)
  );

  screen_timer #(.WIDTH(TIMER_WIDTH), .TERMINAL(TIMER_TERMINAL)) u_timer (
    .clk    (clk),
    .rst_n  (rst_n),
    .restart(bt_reset),
    .count  (screen_time),
    .expired(timer_expired)
  );

  assign alarm_trigger = bt_alarm | timer_expired;
  assign alarm_clear   = reset_pin | bt_reset;

  alarm_system u_alarm (
    .clk    (clk),
    .rst_n  (rst_n),
    .trigger(alarm_trigger),
    .clear  (alarm_clear),
    .beep   (beep)
  );
endmodule
