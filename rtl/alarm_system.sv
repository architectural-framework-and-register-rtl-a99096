// alarm_system: holds the eyewear alarm on until it is silenced.
//
// A one-bit flag is set by `trigger` (the OR of the phone's alarm request and
// the screen-time expiry) and cleared by `clear` (the Reset_pin or a reset from
// the phone). While set, `beep` enables the external sound generator. The
// published design gives only the function (beep on emergency, find my device
// or screen-time overload) and the Reset_pin; the set/clear flag, the
// active-high clear and the rule that a trigger wins over a clear in the same
// cycle are this design's choices.
//
// Timing: `beep` rises one clock after `trigger` and falls one clock after
// `clear`.
module alarm_system (
  input  logic clk,
  input  logic rst_n,
  input  logic trigger,
  input  logic clear,
  output logic beep
);
  timeunit 1ms;
  timeprecision 1us;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       beep <= 1'b0;
    else if (trigger) beep <= 1'b1;
    else if (clear)   beep <= 1'b0;
  end
endmodule
