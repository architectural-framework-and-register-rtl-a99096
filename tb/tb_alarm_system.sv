// tb_alarm_system: self-check of the alarm hold flag.
// Drives random trigger/clear sequences and compares `beep` every clock with
// a reference flag (set by trigger, else cleared by clear); also checks that
// a short trigger pulse keeps the beep on until a clear arrives.
module tb_alarm_system;
  timeunit 1ms;
  timeprecision 1us;

  logic clk = 0, rst_n = 1, trigger = 0, clear = 0;
  logic beep;
  logic ref_beep = 0;
  int checks = 0, failures = 0;

  alarm_system dut (.*);

  always #500 clk = ~clk;

  initial begin
    #(1000.0 * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic t, logic c);
    trigger = t; clear = c;
    @(posedge clk);
    ref_beep = t ? 1'b1 : (c ? 1'b0 : ref_beep);
    #1 checks++;
    if (beep !== ref_beep) begin
      failures++;
      $display("FAIL t=%b c=%b beep=%b expected %b", t, c, beep, ref_beep);
    end
  endtask

  initial begin
    #0.1 rst_n = 0;
    #1 checks++;
    if (beep !== 0) begin failures++; $display("FAIL reset"); end
    #1200 rst_n = 1;
    step(1, 0);
    repeat (20) step(0, 0);
    checks++;
    if (beep !== 1) begin failures++; $display("FAIL alarm not held"); end
    step(0, 1);
    repeat (5) step(0, 0);
    step(1, 1);
    for (int i = 0; i < 1000; i++) step(($urandom % 5) == 0, ($urandom % 4) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
