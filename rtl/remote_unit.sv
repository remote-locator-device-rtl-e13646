// remote_unit: receiver of one remote locator tag.
//
// The base station broadcasts an eight-bit ID as an asynchronous serial
// frame (start bit, eight data bits, stop bit) over a radio link. Every
// remote receives it; the one whose preset ID matches latches an alert and
// drives a square-wave tone into its speaker until the alert is switched off,
// either by its own button or by the base station broadcasting the reset
// code (a frame of eight zero data bits).
//
// Data path: rin (demodulated base-band from the radio receiver) and the
// alert-off button are synchronized (rl_sync2). rl_uart_rx finds and checks
// the start bit and frames the nine following bits; rl_clkgen divides clk by
// OVERSAMPLE and, re-phased at the start bit, marks the middle of each bit;
// rl_shift_reg collects the bits; rl_id_compare matches them against
// PRESET_ID and the reset code when the stop bit is good; rl_tone_gen holds
// the alert latch and divides clk for the tone.
//
// clk must run at OVERSAMPLE (16) times the bit rate. PRESET_ID is compared
// with the data bits in the order they arrive, the first as bit 7. Latency:
// the line passes two synchronizer flip-flops, so the receiver sees the
// start bit on the third rising edge after the line falls; it samples the
// stop bit 152 edges later (8 + 9 x 16), and latch_out rises on the next
// edge, the 156th after the line fell. ttl_out[1] is then a clk/4 square
// wave.
//
// The block structure, the 16x oversampling, the nine-bit register, the
// reset code and the clk/4 tone follow the source design; the single clock
// with enables, the synchronizers and the re-phased divider are this
// implementation's choices. PRESET_ID defaults to C8h, the value the source
// gives for its example unit.
module remote_unit
  import rl_pkg::*;
#(
  parameter logic [DATA_BITS-1:0] PRESET_ID     = 8'hC8,
  parameter int unsigned          OVERSAMPLE    = 16,
  parameter int unsigned          TONE_DIV_BITS = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rin,        // serial data from the receiver
  input  logic                     enable,     // shift register enable
  input  logic                     alert_off,  // alert-off button, active high
  output logic [TONE_DIV_BITS-1:0] ttl_out,    // ttl_out[1] drives the speaker
  output logic                     latch_out,  // alert active
  output logic [FRAME_BITS-1:0]    id_q,       // received data bits and stop bit
  output logic                     slow_clk,   // clk / OVERSAMPLE
  output logic                     check_compare,
  output logic                     compare_out,
  output logic                     frame_err,
  output logic                     noise_rej,
  output logic                     start_bit,  // start-bit latch, active low
  output logic                     busy        // frame reception in progress
);

  logic rin_s, off_s;
  logic slow_tick, align, shift_en;
  logic set_alert, clear_alert;

  rl_sync2 #(.RESET_VAL(1'b1)) u_sync_rin (
    .clk, .rst_n, .d(rin), .q(rin_s)
  );

  rl_sync2 #(.RESET_VAL(1'b0)) u_sync_off (
    .clk, .rst_n, .d(alert_off), .q(off_s)
  );

  rl_clkgen #(.DIV(OVERSAMPLE)) u_clkgen (
    .clk, .rst_n, .align, .slow_tick, .slow_clk
  );

  rl_uart_rx #(.OVERSAMPLE(OVERSAMPLE)) u_uart (
    .clk, .rst_n, .rin(rin_s), .slow_tick,
    .align, .shift_en, .check_compare, .frame_err, .noise_rej,
    .start_bit, .busy
  );

  rl_shift_reg #(.WIDTH(FRAME_BITS)) u_shreg (
    .clk, .rst_n, .enable, .shift_en, .din(rin_s), .q(id_q)
  );

  rl_id_compare u_cmp (
    .q(id_q), .preset_id(PRESET_ID), .check_compare,
    .compare_out, .set_alert, .clear_alert
  );

  rl_tone_gen #(.DIV_BITS(TONE_DIV_BITS)) u_tone (
    .clk, .rst_n, .set_alert, .clear_alert, .alert_off(off_s),
    .latch_out, .ttl_out
  );

endmodule
