// rl_clkgen: divide-by-DIV bit-rate clock generator.
//
// The receiver clock runs at DIV (16) times the serial bit rate. A counter
// divides it by DIV; its top bit is the slow clock of the source design
// (slow_clk = clk/16, a square wave), and slow_tick is a one-cycle enable
// that is high in the last count of each period. Logic that works at the bit
// rate uses slow_tick as a clock enable instead of clocking on slow_clk, so
// the whole design runs on one clock.
//
// align restarts the count at zero. The receiver pulses it in the middle of
// a confirmed start bit, so that slow_tick then falls in the middle of every
// following bit: the first tick comes DIV clock edges after the edge that
// sampled align high. Without align the counter runs freely, as in the
// source design; re-phasing it is this implementation's addition, and it
// merges the source's separate "sampler" counter into this divider.
//
// DIV must be a power of two of at least 2 so that slow_clk is the counter's
// top bit.
module rl_clkgen #(
  parameter int unsigned DIV = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic align,      // restart the period (one-cycle pulse)
  output logic slow_tick,  // one clock cycle per period, at its end
  output logic slow_clk    // clk / DIV, 50 % duty
);

  localparam int unsigned W = $clog2(DIV);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt <= '0;
    else if (align) cnt <= '0;
    else            cnt <= cnt + 1'b1;   // wraps at DIV because DIV = 2**W
  end

  assign slow_tick = (cnt == W'(DIV - 1));
  assign slow_clk  = cnt[W-1];

  initial begin
    assert (DIV >= 2 && (DIV & (DIV - 1)) == 0)
      else $error("rl_clkgen: DIV must be a power of two >= 2");
  end

endmodule
