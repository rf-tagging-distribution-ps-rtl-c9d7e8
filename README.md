# RF tagging and distribution: a clock that carries its own revolution marker

A set of RF synthesisers in a circular accelerator's beam control must all run
from one clock at harmonic 128 of the beam revolution frequency (f_rev), and
they must all agree on *which* of the 128 clock periods begins a revolution.
Instead of sending a separate revolution pulse, which would need its own cable
and arrive with its own skew, this module writes the revolution marker (the
"tag") into the clock itself by pulse-width modulation:

```
        ____      ____      _         ____      ____
  _____|    |____|    |____| |_______|    |____|    |____ ...
        127       128       1         2         3
                            ^ tag: pulse 1 of each revolution is T/4 wide,
                              all other pulses are T/2 wide (T = 1/(128 f_rev))
```

Every rising edge is still a clock edge with the ordinary period, so a receiver
uses the clock as usual. It finds the revolution boundary by checking the
width of each pulse. The tagged clock is made once and fanned out to 14
differential ECL outputs. Every synthesiser fed from it is then locked to the
same revolution phase without ambiguity.

The RF clock comes in at 53.2 to 61.2 MHz, which is 128 f_rev over the
machine's energy range. It comes from a frequency translator that mixes the lower-frequency
beam-control RF with a 51.2 MHz offset. This RTL covers the digital core of the
module, the part that sits in one programmable logic device. The input
receiver, the TTL-to-ECL converter, the two 1:9 ECL clock drivers, the
test-output buffers and the frequency translator are analog. They are left
out, and the core's ports are the points where they connect.

## Block structure

```
                 +-------------------------- tagger --------------------------+
 rf_ck --+------>| tag_counter --tag_win--> pwm_gate u_tag  --> tagged_ck ----+--> test_tagd_ck
         |       |             --test_win-> pwm_gate u_test --> test_tag_det -+--+
         |  +--->|   (rf_ck_q to both pwm_gates)                              |  |
         |  |    |             --frev-----> rf_detect (ref_clk) --> rf_present+--|--> rf_in_led
         |  |    |             --frev---------------------------------------- +--|--> test_frev
         |  |    |  rf_ck ------------------------------------------ rf_in_copy+--|--> test_rf_in
         |  |    +------------------------------------------------------------+  |
         |  |                                                                    v
         +--> quarter_delay (T/4, behavioural) -> rf_ck_q         st3_jumper --> ecl_drive
                                                          (st3_test) ^
```

| Module | What it is |
|---|---|
| `rf_tagging_top` | Top level: delay element, tagger, jumper. |
| `tagger` | The programmable-logic contents: counter, two pulse shapers, LED detector. |
| `tag_counter` | 8-bit period counter; tag windows for every 128th and every 256th pulse; f_rev square wave. |
| `pwm_gate` | Cuts a clock pulse from T/2 to T/4 while its window is set. |
| `quarter_delay` | **Behavioural model** of the T/4 delay element. It is not synthesizable. |
| `rf_detect` | Front-panel "RF IN" LED: on while the RF clock runs. |
| `st3_jumper` | Jumper ST3: distribute the normal tagged clock or the test signal. |
| `rf_tag_pkg` | Shared constants: harmonic 128, test period 256, 14 outputs. |

## How the quarter-period tag is formed

This is the part that needs care, because the design works with both clock
edges and with a delayed copy of the clock.

1. **Counting.** `tag_counter` increments on every rising edge of `rf_ck`. The
   count is 0 during the tagged pulse, "pulse 1" of the revolution. The low 7 bits
   divide by 128. The 8th bit extends the count to 256 periods for the test
   signal.
2. **Windows on the falling edge.** `tag_win` is set at the falling edge
   *before* pulse 1, when the count is 127, and cleared at the falling edge
   that ends pulse 1. So it never changes while `rf_ck` is high. `test_win`
   does the same when the full 8-bit count is 255.
3. **Gating.** `pwm_gate` computes `rf_ck & ~(win & rf_ck_q)`, where `rf_ck_q`
   is `rf_ck` delayed by T/4. When the window is closed, the clock passes
   unchanged. When it is open, the pulse ends when the delayed copy rises,
   T/4 after it started. Because the window changes only while `rf_ck` is low,
   the output has no glitches. The rising edge of the output is the rising
   edge of `rf_ck`, delayed only by the gate.

The T/4 delay is the one analog ingredient. `quarter_delay` models it as a
fixed transport delay of 4.37 ns. That is T/4 at 57.2 MHz, the middle of the
range. At 53.2 MHz the tag is 0.23 T wide and at 61.2 MHz 0.27 T. Both are well
apart from the T/2 of an ordinary pulse. In hardware, replace the model with
a delay line or a chain of gates of that delay, and keep it below T/2 at the
highest frequency. Change it with the parameter `QUARTER_DELAY_PS`.

## Outputs

| Port | Destination | Content |
|---|---|---|
| `ecl_drive` | TTL/ECL converter, then 2 x 1:9 ECL drivers (14 outputs used) | the signal chosen by ST3 |
| `test_tagd_ck` | TAG'D CK test buffer | the normal tagged clock |
| `test_rf_in` | TEST_RF_IN buffer | the RF input as received |
| `test_frev` | TEST_Frev buffer | 50 % square wave at f_rev; its rising edge coincides with the start of each tag pulse |
| `rf_in_led` | front-panel LED driver | 1 while the RF clock runs |

Inputs: `rf_ck` (TTL RF clock), `ref_clk` (local free-running clock, 10 MHz
nominal, used only for the LED), `rst_n` (active-low power-on reset,
asynchronous), and `st3_test` (jumper position).

## Test mode: jumper ST3

In the normal position (pins 1 and 2 joined, `st3_test = 0`) the distributed
clock carries a tag every 128 periods. In the test position (pins 2 and 3,
`st3_test = 1`) it carries the test signal `test_tag_det`. That signal puts a
tag every 256 periods, so every second revolution has no tag. A synthesiser
that checks the tag must then report a tag error. This is how the error
detection of the receivers is checked. The test signal runs all the time and
is in step with the normal one: its tags are every second normal tag.
The jumper is a static selection. Move it only while the module is not in
use, or accept one odd revolution at the moment of the change.

## RF presence LED

The LED must go dark when the RF input disappears. A detector clocked by the
RF clock would stop with it, so `rf_detect` runs on a separate local clock,
`ref_clk`. It passes the f_rev square wave through a two-flop synchroniser.
Every edge reloads a down-counter with `LED_TIMEOUT` (default 256). The LED is
on while the counter is non-zero. At 10 MHz that is 25.6 us, about ten
revolutions, so the LED is steady while RF is present and goes off within
about 26 us of its loss. After an edge, the LED turns on 3 `ref_clk` cycles
later. f_rev changes about every 1.1 to 1.2 us, so `ref_clk` may be anything
from a few MHz up. Scale `LED_TIMEOUT` with it.

## Departures and choices

What the source material fixes:
- harmonic 128
- tag by pulse width: T/2 normal, T/4 tag on pulse 1
- a 7-bit counter
- a test signal with a tag every 256 periods, chosen by ST3
- the f_rev, RF-in and tagged-clock test outputs
- an RF-presence LED
- 14 ECL outputs
- 53.2 to 61.2 MHz

What this design chose on its own:
- **How the T/4 pulse is made**: a delayed clock copy and an AND-NOT gate.
  The delay is fixed, so the tag width is exactly T/4 only at 57.2 MHz.
- **Falling-edge windows**, so the gating has no glitches.
- **An 8th counter bit** for the 256-period test signal. The test tags line
  up with every second normal tag.
- **f_rev as a 50 % square wave** whose rising edge is at the tag. The
  source only calls it the revolution frequency.
- **The LED detector**: a local reference clock and a timeout. The source does
  not say how presence is detected, or what clock the logic device has
  besides the RF clock.
- **TAG'D CK test output** carries the normal tagged clock, taken before the
  jumper.
- **Power-on reset** `rst_n`, asynchronous, clears the counter. Without it the
  counter would still run correctly, just from an arbitrary phase.

Not modelled: the input receiver (Schmitt trigger, ECL/TTL conversion, duty
adjustment), the TTL/ECL converter, the ECL fan-out drivers, the output
buffers, and the frequency translator. These are analog.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | Covers |
|---|---|
| `tb_tag_counter` | count, windows and f_rev against the number of edges since reset, 1000 periods |
| `tb_pwm_gate` | pulse widths T/2 and T/4 and edge alignment, random windows |
| `tb_quarter_delay` | output equals input 4370 ps earlier |
| `tb_st3_jumper` | selection, all input combinations |
| `tb_rf_detect` | LED on after exactly 3 cycles, off exactly TIMEOUT cycles after the last edge |
| `tb_tagger` | both tagged outputs (widths, spacing 128/256), f_rev alignment, LED on and off |
| `tb_rf_tagging_top` | end to end at default parameters (see below) |
| `tb_test_procedure` | acceptance test with 14 receivers (see below) |

The end-to-end test runs the top at its default parameters. It covers:
- normal operation at 57.2 MHz
- the jumper moved to the test position and back
- frequency steps to 53.2 and 61.2 MHz
- loss of RF until the LED goes off, then recovery

It measures every pulse on the distributed output and the test output.
It checks tag spacing (128, or 256 in test mode), pulse widths, f_rev
alignment, and the LED timing. It also counts how often each of these
happened: normal tags, test tags, jumper moves, frequency steps, LED on and
LED off. It runs in well under a second.

`tb_test_procedure` follows the module's acceptance procedure. It also runs
the top at its defaults. Each of the 14 outputs feeds `tb/tag_receiver_model.sv`.
That is a behavioural model of the tag decoder in a receiving synthesiser. It
takes a pulse shorter than 3/8 T as a tag, and it flags a tag error when a tag
is out of place or a revolution has none. The receivers are plugged in at
random moments. The test checks that:
- all 14 lock and agree on the pulse number;
- that number is 0 whenever f_rev rises;
- none reports an error at 53.2, 57.2 or 61.2 MHz;
- every receiver reports a tag error with ST3 in the test position;
- the errors stop once ST3 is back in the normal position.

Run a testbench with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_rf_tagging_top rtl/rf_tag_pkg.sv tb/tb_rf_tagging_top.sv
./obj_dir/Vtb_rf_tagging_top
```

Verilator simulates two states only. All state elements are cleared by
`rst_n`, and the testbenches apply a power-on reset pulse. All files use a
1 ps time unit.

## Synthesis notes

Everything except `quarter_delay` is synthesizable. The design has three
clock inputs: `rf_ck`, which is used on both edges, `ref_clk`, and
`rf_ck_q`. `rf_ck_q` is used only as a gating input, not as a clock. The
outputs of `pwm_gate` are combinational functions of clocks. This is
deliberate: the tagged clock *is* the RF clock with some pulses cut short. In
a real device, keep the two gate inputs' paths matched. The only timing
requirement is that `tag_win` settles within the low half-period. The whole
core needs 8 counter flops, 2 window flops and 6 flops plus a 9-bit timer in
the LED detector.
