// screen_timer: two-hour screen-time counter.
//
// A WIDTH-bit up-counter clocked by the 1 Hz clock counts seconds from 0.
// After TERMINAL seconds (7200 = 2 h with the 13-bit default) it returns to 0
// and `expired` is high for one clock, telling the alarm that a break is due;
// the cycle then repeats forever. `restart` returns the count to 0 at the next
// edge. Counter width and terminal count follow the published design.
// The published circuit clears the flip-flops through their reset pins once
// the count reaches 7200; here the wrap is synchronous (7199 -> 0), which keeps
// the same 7200-clock period without the momentary 7200 state. The form of
// `expired` (a decode of the last count, one clock wide) and the `restart`
// input are this design's choices.
//
// Timing: `expired` is high during the last clock of each period (count =
// TERMINAL-1), so a flop fed by it changes on the same edge at which the count
// returns to 0: TERMINAL clocks after reset or restart, then every TERMINAL
// clocks.
module screen_timer #(
  parameter int unsigned WIDTH    = 13,
  parameter int unsigned TERMINAL = 7200
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  output logic [WIDTH-1:0] count,
  output logic             expired
);
  timeunit 1ms;
  timeprecision 1us;

  localparam logic [WIDTH-1:0] LAST = WIDTH'(TERMINAL - 1);

  logic at_last;
  assign at_last = (count == LAST);

  assign expired = at_last && !restart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (restart) begin
      count <= '0;
    end else begin
      count <= at_last ? '0 : count + 1'b1;
    end
  end

  initial assert (TERMINAL >= 2 && 64'(TERMINAL) <= (64'd1 << WIDTH))
    else $error("TERMINAL must fit in WIDTH bits");

  assert property (@(posedge clk) count <= LAST);
endmodule
