// tb_screen_timer: self-check of the two-hour screen-time counter at its
// full size (13 bits, 7200 counts). A reference counter in the testbench
// predicts the count every clock; the test checks that `expired` is high for
// exactly one clock, the last of each period, every 7200 clocks (three periods), that the count never
// passes 7199, and that `restart` returns the count to 0 mid-period.
module tb_screen_timer;
  timeunit 1ms;
  timeprecision 1us;

  localparam int unsigned WIDTH = 13;
  localparam int unsigned TERMINAL = 7200;

  logic clk = 0, rst_n = 1, restart = 0;
  logic [WIDTH-1:0] count;
  logic expired;
  int checks = 0, failures = 0;
  int unsigned ref_count = 0, cycle = 0, expiries = 0;
  int last_expiry = -1;

  screen_timer #(.WIDTH(WIDTH), .TERMINAL(TERMINAL)) dut (.*);

  always #500 clk = ~clk;   // 1 Hz

  initial begin
    #(1000.0 * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic rs);
    logic exp_expired;
    restart = rs;
    @(posedge clk);
    ref_count   = (rs || ref_count == TERMINAL - 1) ? 0 : ref_count + 1;
    cycle++;
    #1;
    exp_expired = !rs && (ref_count == TERMINAL - 1);
    checks++;
    if (count !== WIDTH'(ref_count) || expired !== exp_expired) begin
      failures++;
      if (failures < 10)
        $display("FAIL cycle %0d: count=%0d expired=%b, expected %0d %b",
                 cycle, count, expired, ref_count, exp_expired);
    end
    if (expired) begin
      expiries++;
      checks++;
      if (int'(cycle) - last_expiry != int'(TERMINAL)) begin
        failures++;
        $display("FAIL expiry interval %0d, expected %0d", int'(cycle) - last_expiry, TERMINAL);
      end
      last_expiry = int'(cycle);
    end
  endtask

  initial begin
    #0.1 rst_n = 0;
    #1 checks++;
    if (count !== 0 || expired !== 0) begin failures++; $display("FAIL reset state"); end
    #1200 rst_n = 1;
    for (int i = 0; i < 3 * TERMINAL; i++) step(0);
    checks++;
    if (expiries != 3) begin failures++; $display("FAIL %0d expiries, expected 3", expiries); end
    for (int i = 0; i < 1000; i++) step(0);
    step(1);
    last_expiry = int'(cycle) - 1;
    for (int i = 0; i < TERMINAL + 5; i++) step(0);
    checks++;
    if (expiries != 4) begin failures++; $display("FAIL %0d expiries after restart, expected 4", expiries); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
