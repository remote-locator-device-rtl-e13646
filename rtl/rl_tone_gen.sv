// rl_tone_gen: alert latch and tone divider driving the speaker.
//
// latch_out is set by a matching frame (set_alert) and stays set until the
// base unit's reset-code frame (clear_alert) or the unit's own alert-off
// button (alert_off) clears it; a clear wins over a set in the same cycle.
// While latch_out is high a DIV_BITS-wide counter counts clk, so ttl_out[k]
// is a square wave of frequency clk / 2**(k+1): with the default two bits,
// ttl_out[1] is clk/4 (a 2 kHz receiver clock gives the 500 Hz speaker tone)
// and ttl_out[0] is clk/2. latch_out changes on the clock edge after the
// pulse; the counter starts on the edge after that. The latch, the clear by
// reset code or button, and the divide-by-four counter follow the source
// design. Clearing the counter while the latch is off, so the speaker line
// rests low, is this implementation's choice (the source design only stops
// it).
module rl_tone_gen #(
  parameter int unsigned DIV_BITS = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                set_alert,    // matching ID received
  input  logic                clear_alert,  // reset code received
  input  logic                alert_off,    // synchronized off button
  output logic                latch_out,
  output logic [DIV_BITS-1:0] ttl_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         latch_out <= 1'b0;
    else if (clear_alert || alert_off)  latch_out <= 1'b0;
    else if (set_alert)                 latch_out <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          ttl_out <= '0;
    else if (latch_out)  ttl_out <= ttl_out + 1'b1;
    else                 ttl_out <= '0;
  end

endmodule
