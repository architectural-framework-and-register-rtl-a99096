// astable_multivibrator: behavioural model (not synthesizable) of the
// two-transistor astable multivibrator that clocks the eyewear chip.
//
// The real part is analog: two 2N2222 transistors cross-coupled through
// C1 = C2 = C, with base resistors R2 = R3 = R and 270-ohm collector loads,
// from a 5 V supply. With equal halves it oscillates at F = 1/(1.38 R C).
// The published values R = 18 kOhm and C = 47 uF give a period of 1.1675 s
// (0.857 Hz, "almost 1 Hz"). The model is an ideal square wave on `vmon`
// with that period and 50% duty, starting low; the start-up transient and
// the ripple of the real circuit are not modelled.
//
// Synthesis ignores the delay, so a synthesis tool sees `vmon` as undriven;
// that warning stands, because the real oscillator is an analog circuit.
//
// Interface: one output, the square wave measured at VMON in the circuit.
module astable_multivibrator #(
  parameter int unsigned R_OHM = 18000,
  parameter int unsigned C_UF  = 47
) (
  output logic vmon
);
  timeunit 1ms;
  timeprecision 1us;

  // Period in ms: 1.38 * R[ohm] * C[uF] * 1e-6 s * 1e3 ms/s.
  localparam realtime PERIOD_MS = 1.38 * real'(R_OHM) * real'(C_UF) * 1.0e-3;
  localparam realtime HALF_MS   = PERIOD_MS / 2.0;

  initial vmon = 1'b0;
  always #(HALF_MS) vmon = ~vmon;
endmodule
