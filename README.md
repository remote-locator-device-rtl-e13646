# Remote locator tag receiver

A base station with a keypad and a display keeps a list of household items
(keys, remote controls) and the 8-bit ID of the small tag attached to each.
When the user asks for an item, the base broadcasts that ID over a simple
433 MHz radio link as an ordinary asynchronous serial frame. Every tag hears
every frame. The tag whose preset ID matches latches an alert and beeps
until someone presses the button on the tag, or the base broadcasts the
"all off" code.

This repository is the tag's logic, `remote_unit`: a 16x-oversampling serial
receiver, a nine-bit shift register, an ID comparator and an alert latch
with a tone divider. It was originally built for a small CPLD and fits in
about 30 flip-flops. The base station is microcontroller firmware and is not
part of the RTL. A behavioural model of its serial output is used by the
test benches.

## The frame on the line

The radio receiver outputs a demodulated logic-level line (`rin`) that
rests high. One frame is:

| bit time | 0     | 1 .. 8                  | 9    |
|----------|-------|-------------------------|------|
| level    | 0     | eight code bits         | 1    |
| meaning  | start | first bit = ID bit 7    | stop |

Three conventions matter when you pick IDs:

* **Bit order.** The tag compares the code bits in the order they arrive.
  The first bit is compared with bit 7 of `PRESET_ID`.
* **Inversion.** The base firmware complements the ID before its serial
  port sends it. A tag is therefore programmed with the complement of the ID
  kept in the base. The worked example of the original project is ID 37h,
  which goes on the line as C8h, so the example tag is preset to C8h (the
  default of `PRESET_ID`).
* **All off.** A frame whose eight code bits are all zero clears the alert
  in every tag. After such a frame the shift register holds `0_0000_0001`,
  eight zeros and the stop bit. That value, `rl_pkg::RESET_CODE`, must not
  be used as an ID.

For an alert the firmware sends the same frame 20 times back to back, with
no idle time between the stop bit and the next start bit.

## Receiving a frame

This is the part that needs care. Everything runs on one clock, `clk`,
which must be 16 times the bit rate (`OVERSAMPLE`).

1. **Start edge.** In idle the receiver (`rl_uart_rx`) waits for the
   synchronized line to read low. It then sets the start-bit latch
   (`start_bit` goes low) and starts a half-bit counter.
2. **Noise check.** Eight clocks later, at the middle of the start bit, it
   looks at the line again. If the line is high again, the edge was a
   glitch: `noise_rej` pulses and the receiver goes back to idle. If it is
   still low, the start bit is accepted and the receiver pulses `align`.
3. **Mid-bit sampling.** `align` restarts the divide-by-16 counter in
   `rl_clkgen`. That counter is also the source of the slow clock
   (`slow_clk = clk/16`). Its one-cycle `slow_tick` now falls exactly 16,
   32, ..., 144 clocks after the middle of the start bit. That is the middle
   of each of the eight code bits and of the stop bit. On each tick,
   `shift_en` makes the shift register take the line.
4. **Stop bit.** The ninth tick samples the stop bit, and the receiver
   returns to idle. If the stop bit is high, `check_compare` pulses in the
   next cycle. The register then holds all nine bits. If it is low,
   `frame_err` pulses and the frame is ignored.

Because sampling is re-centred on every start bit, the transmitter's rate
may be off by a few percent. The error builds up over 9.5 bits and must
stay under half a bit (8 clocks). With the one-clock uncertainty of edge
detection, that means a little under ±5 %. The test bench shows that ±3 %
is received and 12.5 % slow is not.

A low stop bit can leave the receiver out of step. The line may still be
low when the receiver returns to idle, and that low is taken as a new start
bit. The false frame ends after ten bit times. The receiver then locks onto
the next real start edge once the line has idled for a frame's length. This
is normal UART behaviour.

Timing, in rising clock edges after the line falls:

| event                                   | edge |
|-----------------------------------------|------|
| line seen low by the receiver (after 2 synchronizer flops) | 3 |
| start bit re-checked                    | 11   |
| code bit k sampled (k = 1..8)           | 11 + 16k |
| stop bit sampled                        | 155  |
| `check_compare` high                    | cycle after 155 |
| `latch_out` rises                       | 156  |

## Comparing and alerting

`rl_shift_reg` is a nine-bit register that shifts toward its top bit. After
a frame, `q[8]` holds the first code bit and `q[0]` holds the stop bit. The
top-level port `enable` must be high for it to shift. With `enable` low,
frames are still framed and checked, but the register keeps its old
contents.

`rl_id_compare` is combinational. It compares each register bit with
`{PRESET_ID, 1}`. It also decodes the all-off code. Both results are gated
by `check_compare`, so they become one-cycle `set_alert` / `clear_alert`
pulses only after a frame with a good stop bit.

`rl_tone_gen` holds the alert latch (`latch_out`):

* A match sets it.
* The all-off frame or the tag's button (`alert_off`, synchronized)
  clears it.
* If a clear and a set come in the same cycle, the clear wins.
* While the button is held, matching frames do not set the alert.

While the latch is set, a 2-bit counter runs on `clk`:

* `ttl_out[1]` is the speaker drive. It is a square wave at clk/4.
* `ttl_out[0]` is clk/2.

When the latch clears, the counter is reset, so the speaker line rests low.

## Clock and rates

The original design states both a 2 kHz receiver clock (giving the 500 Hz
tone as clk/4) and a base serial port set to 1.8 kbaud. With 16x
oversampling these two figures do not agree. The RTL is not tied to either:

* For a given bit rate *B*, run `clk` at 16·*B*.
* The tone is then 4·*B*.

If the tone must be a fixed pitch at a different bit rate, change
`TONE_DIV_BITS`. `ttl_out[k]` is clk / 2^(k+1).

## Modules

| module          | role |
|-----------------|------|
| `rl_pkg`        | frame sizes, `RESET_CODE`, receiver state type |
| `rl_sync2`      | two-flop synchronizer (line and button) |
| `rl_clkgen`     | divide-by-16, `slow_clk`, `slow_tick`, re-phased by `align` |
| `rl_uart_rx`    | start detection, noise check, bit counting, stop check |
| `rl_shift_reg`  | nine-bit receive register |
| `rl_id_compare` | preset-ID match and all-off decode |
| `rl_tone_gen`   | alert latch and tone divider |
| `remote_unit`   | top level |

Top-level parameters:

| parameter       | default | meaning |
|-----------------|---------|---------|
| `PRESET_ID`     | `8'hC8` | this tag's ID (line order, first bit = bit 7) |
| `OVERSAMPLE`    | 16      | clocks per bit; a power of two, at least 2 |
| `TONE_DIV_BITS` | 2       | width of the tone divider |

Top-level ports:

* Inputs: `clk`, `rst_n` (asynchronous, active low), `rin`, `enable`,
  `alert_off`.
* Outputs: `ttl_out`, `latch_out`, and `id_q`, the register contents.
* Observation outputs: `slow_clk`, `check_compare`, `compare_out`,
  `frame_err`, `noise_rej`, `start_bit`, `busy`.

## How this differs from the original design

These behaviours are kept from the original design:

* the block split;
* 16x oversampling;
* the half-bit start check with noise rejection;
* eight data bits plus a checked stop bit;
* the nine-bit register shifting toward the top bit;
* the all-off code `0_0000_0001`;
* the set/clear alert latch;
* the clk/4 tone.

These are this implementation's choices:

* **One clock domain.** The original clocked the shift register and latch
  from the derived slow clock. Here they run on `clk` and use `slow_tick` or
  `shift_en` as enables. `slow_clk` is still produced and brought out.
* **Shifting at mid-bit.** In the original, the register shifted on every
  free-running slow-clock edge. Whether it caught each bit cleanly
  depended on the phase between that clock and the data. Here the divider
  is re-phased at each start bit, and the register shifts only on the
  receiver's mid-bit strobes. This also merges the original's separate
  "sampler" counter into the divider.
* **Synchronizers.** There are two-flop synchronizers on `rin` and
  `alert_off`. They add two clocks of latency.
* **Control details.** The following are this design's own:
  * `check_compare` is a single-cycle pulse;
  * a clear has priority over a set;
  * the tone counter is cleared when the alert is off.
* **Bit width.** The original text calls the register eight-bit. Its
  implementation, and the all-off code, use nine bits (data plus stop),
  and that is what is built.

## Not included

These parts of the system are not logic:

* the radio transceiver;
* the speaker;
* the buttons;
* the battery;
* the CPLD the logic was mapped to.

The whole base station is also left out. It is a microcontroller board
with an LCD, a keypad and a DUART, running menu firmware (alert, save and
load modes). `tb/base_unit_tx.sv` models only what the tag sees from it:

* the inverted ID, sent as start, eight code bits MSB first, and stop;
* 20 repeats per alert;
* the all-off frame;
* glitches;
* an adjustable bit period.

## Simulating

Each test bench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. It needs the package first and the RTL it uses. For example, the
end-to-end test at the default parameters is:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rl_pkg.sv rtl/*.sv tb/base_unit_tx.sv tb/tb_remote_unit.sv \
  --top-module tb_remote_unit -o sim
./obj_dir/sim
```

| test bench          | covers |
|---------------------|--------|
| `tb_rl_clkgen`      | tick period and duty; tick exactly 16 clocks after `align` |
| `tb_rl_uart_rx`     | strobe positions and sampled bits for random frames; stop-bit error; glitches of 1-6 clocks |
| `tb_rl_shift_reg`   | shift direction and enable against a reference model |
| `tb_rl_id_compare`  | all 512 register values for four preset IDs |
| `tb_rl_tone_gen`    | set, clear by code and button, clear priority, clk/4 and clk/2 waveforms |
| `tb_remote_unit`    | the whole tag at defaults (details below) |
| `tb_preset_aa`      | a tag preset to AAh (10101010) ignores neighbouring codes, alerts on AAh, clears on all-off |

`tb_remote_unit` runs these cases, counts each one, and fails if any never
happened:

* frames for other tags;
* one matching frame, with a 156-clock latency and clk/4 tone;
* the 20-frame alert burst for ID 37h;
* all-off from the base;
* the tag's button;
* a glitch;
* a bad stop bit;
* `enable` low;
* ±3 % rate;
* 12.5 % slow rate.

All of these simulate in well under a second.
