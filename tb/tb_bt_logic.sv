// tb_bt_logic: exhaustive self-check of the Bluetooth code logic.
// Applies every combination of switch_press, impact_signal and the received
// code, compares the three outputs with a reference table written from the
// code definitions (rx 01 = alarm, rx 10 = reset; tx 10 = SOS, tx 01 =
// impact, 00 = none, SOS first), then replays the published scenario:
// reset code, alarm code, switch press, impact.
module tb_bt_logic;
  timeunit 1ms;
  timeprecision 1us;
  import eyewear_pkg::*;

  logic     switch_press, impact_signal;
  rx_code_e code;
  tx_code_e bt_code;
  logic     alarm, reset;
  int checks = 0, failures = 0;

  bt_logic dut (.*);

  task automatic expect_out(logic [1:0] tx, logic al, logic rs, string what);
    #1;
    checks++;
    if (bt_code !== tx_code_e'(tx) || alarm !== al || reset !== rs) begin
      failures++;
      $display("FAIL %s: bt_code=%b alarm=%b reset=%b, expected %b %b %b",
               what, bt_code, alarm, reset, tx, al, rs);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [1:0] etx;
      switch_press  = i[3];
      impact_signal = i[2];
      code          = rx_code_e'(i[1:0]);
      etx = i[3] ? 2'b10 : (i[2] ? 2'b01 : 2'b00);
      expect_out(etx, i[1:0] == 2'b01, i[1:0] == 2'b10, $sformatf("combo %0d", i));
    end
    // Published scenario, step by step.
    switch_press = 0; impact_signal = 0;
    code = rx_code_e'(2'b10); expect_out(2'b00, 0, 1, "phone sends reset");
    code = rx_code_e'(2'b01); expect_out(2'b00, 1, 0, "phone sends alarm");
    code = rx_code_e'(2'b00); switch_press = 1; expect_out(2'b10, 0, 0, "switch press");
    switch_press = 0;         expect_out(2'b00, 0, 0, "idle");
    impact_signal = 1;        expect_out(2'b01, 0, 0, "impact");
    impact_signal = 0;        expect_out(2'b00, 0, 0, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
