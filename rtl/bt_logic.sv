// bt_logic: combinational glue between the chip and its Bluetooth module.
//
// Decodes the 2-bit code received from the module: 01 raises `alarm`
// ("find my device"), 10 raises `reset` (the phone resets the chip). It also
// builds the panic code sent back: 10 while the SOS switch is pressed, 01
// while the impact sensor signals. Those four code values are the published
// design's. When neither input is active the code 00 is sent; when both are
// active the switch press (10) wins; received codes 00 and 11 do nothing.
// These three points are this implementation's choices.
//
// Timing: purely combinational, outputs follow inputs in the same cycle.
module bt_logic
  import eyewear_pkg::*;
(
  input  logic     switch_press,
  input  logic     impact_signal,
  input  rx_code_e code,
  output tx_code_e bt_code,
  output logic     alarm,
  output logic     reset
);
  timeunit 1ms;
  timeprecision 1us;

  always_comb begin
    if (switch_press)       bt_code = TX_SOS;
    else if (impact_signal) bt_code = TX_IMPACT;
    else                    bt_code = TX_NONE;
  end

  assign alarm = (code == RX_ALARM);
  assign reset = (code == RX_RESET);

  // The two received actions are mutually exclusive by construction.
  always_comb assert (!(alarm && reset));
endmodule
