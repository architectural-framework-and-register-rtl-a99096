// eyewear_pkg: codes and sizes shared by the eyewear chip.
//
// The chip and its Bluetooth module exchange 2-bit codes. Received codes:
// 01 starts the alarm ("find my device"), 10 resets the chip. Sent codes:
// 10 when the SOS push button is pressed, 01 when the impact sensor fires.
// These values follow the published design. The "no code" value 00 and the
// use of enums are this implementation's own choice.
package eyewear_pkg;
  timeunit 1ms;
  timeprecision 1us;

  // Code received from the Bluetooth module (phone -> chip).
  typedef enum logic [1:0] {
    RX_NONE  = 2'b00,
    RX_ALARM = 2'b01,
    RX_RESET = 2'b10,
    RX_RSVD  = 2'b11
  } rx_code_e;

  // Panic code sent to the Bluetooth module (chip -> phone).
  typedef enum logic [1:0] {
    TX_NONE   = 2'b00,
    TX_IMPACT = 2'b01,
    TX_SOS    = 2'b10
  } tx_code_e;
endpackage
