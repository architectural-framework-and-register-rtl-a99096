# Smart-eyewear chip

A very small system-on-chip meant to sit inside a spectacle frame and do three jobs:

* **Screen-time reminder.** A counter on a slow (~1 Hz) clock beeps every 7200 ticks, about every two hours, to tell
  the wearer to rest their eyes. Then it starts the next period.
* **Find my device.** A phone paired over Bluetooth can make the spectacles beep.
* **Emergency codes.** An SOS push button on the frame, or a piezoelectric impact sensor that fires when the frame
  is dropped or hit, sends a panic code to the phone through the Bluetooth module.

The digital part is deliberately tiny: 14 flip-flops and a few gates. A transistor astable multivibrator makes the
clock, so the chip needs no crystal and no 555 timer. A Bluetooth module, bought ready-made, carries the codes to
and from the phone.

## Block structure

```
  astable_multivibrator --> clk of every flip-flop, and clk_pin

  push_button, impact_signal, bt_rx_code --> bt_logic --> bt_tx_code
                                             |      |
                                         bt_alarm  bt_reset

  restart = bt_reset                        --> screen_timer --> screen_time, expired
  trigger = bt_alarm  | expired   (OR gate) --> alarm_system --> beep
  clear   = reset_pin | bt_reset  (OR gate) --> alarm_system
```

| module | file | what it is |
|---|---|---|
| `eyewear_soc` | `rtl/eyewear_soc.sv` | top: instantiates the blocks and the two OR gates |
| `bt_logic` | `rtl/bt_logic.sv` | combinational code encoder/decoder for the Bluetooth link |
| `screen_timer` | `rtl/screen_timer.sv` | 13-bit seconds counter, period 7200 |
| `alarm_system` | `rtl/alarm_system.sv` | set/clear flag that enables the beep |
| `astable_multivibrator` | `rtl/astable_multivibrator.sv` | **behavioural model** of the analog clock oscillator (not synthesizable) |
| `eyewear_pkg` | `rtl/eyewear_pkg.sv` | enums for the 2-bit codes |

These parts are outside the RTL, and their signals are top-level ports: the Bluetooth module (`bt_rx_code`,
`bt_tx_code`), the impact sensor (`impact_signal`), the sound generator that makes the tone (`beep` is its enable),
the push button, and the pads.

## The Bluetooth codes

The chip and the Bluetooth module exchange 2-bit codes in each direction. `bt_logic` is purely combinational.

| direction | code | meaning |
|---|---|---|
| phone -> chip (`bt_rx_code`) | `01` | start the alarm ("find my device") |
| phone -> chip | `10` | reset: restart the screen timer and silence the alarm |
| chip -> phone (`bt_tx_code`) | `10` | SOS push button is pressed |
| chip -> phone | `01` | impact sensor fired |
| chip -> phone | `00` | nothing to report |

Received codes `00` and `11` do nothing. `bt_tx_code` follows the button and sensor inputs with no clock. It is a
level, not a message: whatever carries it over the radio has to sample it. If the button and the impact come
together, the button's code `10` is sent.

## Timing of the screen timer and the alarm

The timer counts 0, 1, ..., 7199, 0, ... on every rising clock edge. `expired` is decoded from the count 7199, so
it is high during the last clock of each period. On the edge that returns the count to 0, the alarm flag is set,
and `beep` rises. After power-on reset, or after a reset code from the phone, the first beep therefore comes
exactly 7200 clocks later, and then one comes every 7200 clocks.

The alarm flag is set by `bt_alarm | expired` and cleared by `reset_pin | bt_reset`. A set wins over a clear in the
same cycle. Once set, the flag stays on until something clears it: a reminder beep that nobody acknowledges keeps
beeping.

13 bits are the fewest that hold 7200 (`7200 = 13'b1110000100000`). Both the width and the terminal count are
parameters of `screen_timer` and of the top (`TIMER_WIDTH`, `TIMER_TERMINAL`).

## The clock

The oscillator is a classic two-transistor astable multivibrator. It has two 2N2222 transistors, 18 kOhm base
resistors, 47 uF cross-coupling capacitors, 270 Ohm collector loads and a 5 V supply. It oscillates at
F = 1 / (1.38 R C). The model `astable_multivibrator` produces an ideal square wave with that period and a 50%
duty cycle. It does not model the start-up transient or the ripple of the real circuit. Synthesis ignores its
delay, so a synthesis tool sees its output as undriven. In silicon it would be replaced by the analog circuit.

**The component values do not give 1 Hz.** With R = 18 kOhm and C = 47 uF the formula gives a period of 1.1675 s,
which is 0.857 Hz. The 7200-tick reminder then comes every 8406 s, about 2 h 20 min. R = 15.4 kOhm would give
1 Hz. The model follows the formula with the values as chosen. Both values are parameters (`R_OHM`, `C_UF`) of the
model and of the top.

## Where this RTL makes its own choices

The published design fixes the following: the four code values, the 13-bit counter with its 7200-second period,
the RC values with their frequency formula, and the OR gates that join the blocks. Everything below is a choice
of this RTL, or a departure from that design.

* **Wrap of the timer.** The counter wraps synchronously, from 7199 to 0. A circuit that lets the count reach 7200
  and then clears the flip-flops asynchronously has the same period. That version glitches, because the 7200 state
  is seen briefly.
* **Code value when idle.** The value sent when nothing is pressed (`00`) and the priority between button and
  impact are choices of this RTL.
* **Which inputs the alarm OR gate takes.** The impact sensor and the SOS button do not start the beep. They only
  send a code to the phone. The alarm comes from the phone's `01` code or from the timer. If the phone should answer
  an impact with a beep, it sends `01`.
* **Separate button and impact inputs.** They stay separate wires into `bt_logic`, because the two send different
  codes.
* **What the reset code does.** The phone's reset code both restarts the timer and silences the alarm.
* **Reset pins.** `rst_n` (active low, asynchronous) is a power-on reset added for every flip-flop. `reset_pin` is
  active high and only silences the alarm.
* **Physical design is out of scope.** The pad ring and pin placement (ten I/O pins, three metal layers) are not
  part of this RTL.

## Simulating

Every file sets `timeunit 1ms; timeprecision 1us;`, so one time unit is one millisecond. The package must be read
first. For example, the end-to-end test at full size:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/eyewear_pkg.sv tb/tb_eyewear_soc.sv --top-module tb_eyewear_soc
./obj_dir/Vtb_eyewear_soc
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_eyewear_soc` drives the top with every parameter at its default:
  * it replays the code sequence reset, alarm, button, impact;
  * it silences the alarm with `reset_pin`;
  * it restarts the timer from the phone;
  * it then runs two full 7200-clock periods with random button and impact activity.

  It checks `bt_tx_code`, `beep` and `screen_time` against a reference model on every clock. It checks the clock
  period and that the first reminder beep comes 7200 clocks after the restart. It counts each mechanism (SOS code,
  impact code, phone alarm, phone reset, timer beep, pin clear) and fails if one never happened. It runs in well
  under a second.
* `tb_bt_logic` tries all 16 input combinations.
* `tb_screen_timer` runs three full periods and a restart at 13 bits / 7200.
* `tb_alarm_system` runs random set/clear sequences.
* `tb_astable_multivibrator` measures 20 periods against 1.38 R C.

## Trust

All blocks lint cleanly under `verilator -Wall` and elaborate in the slang front end. Each testbench has been shown
to catch a deliberately broken copy of its block.

The logic is small enough that the tests are close to exhaustive:
* the code logic: every input combination;
* the timer and the top: every clock, against a reference model;
* the alarm flag: random set/clear sequences.

The clock model is the least trustworthy part: it is an idealisation of an analog circuit.
