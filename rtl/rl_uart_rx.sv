// rl_uart_rx: start-bit detection and bit framing for the remote unit.
//
// The line idles high. When the (synchronized) input rin is first seen low,
// the start-bit latch is set (start_bit goes low, as in the source design)
// and a half-bit counter runs for OVERSAMPLE/2 clocks. If rin is then still
// low the start bit is confirmed: align restarts the bit-rate divider
// (rl_clkgen), whose slow_tick then falls in the middle of each of the next
// nine bits. If rin has gone high again the falling edge was noise: noise_rej
// pulses and the receiver waits for the next falling edge.
//
// In the middle of each of the eight data bits and of the stop bit, shift_en
// is high for one clock, telling the shift register to take rin. A bit
// counter counts the nine samples. At the ninth (the stop bit) the receiver
// returns to idle; if rin is high there, check_compare pulses for one clock
// in the following cycle, when the shift register already holds all nine
// bits. If the stop bit is low, frame_err pulses instead and nothing is
// compared.
//
// Timing, counted in clock edges from the edge that first sees rin low: the
// start bit is checked at edge 8 (OVERSAMPLE/2), data bit k (k = 1..8) is
// sampled at edge 8 + 16k, the stop bit at edge 152 and check_compare is high
// in the cycle after that edge. The behaviour (half-bit start check, noise
// rejection, eight data bits and a checked stop bit, a compare trigger)
// follows the source design; the three-state controller, the counter
// encodings and the one-cycle pulses are this implementation's own.
module rl_uart_rx
  import rl_pkg::*;
#(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rin,            // synchronized serial data, idle high
  input  logic slow_tick,      // mid-bit tick from rl_clkgen
  output logic align,          // restart rl_clkgen (start bit confirmed)
  output logic shift_en,       // sample rin into the shift register now
  output logic check_compare,  // frame complete, stop bit high
  output logic frame_err,      // frame complete, stop bit low
  output logic noise_rej,      // falling edge was not a start bit
  output logic start_bit,      // start-bit latch, active low
  output logic busy            // a frame is being received
);

  localparam int unsigned HALF = OVERSAMPLE / 2;
  localparam int unsigned HW   = $clog2(HALF) > 0 ? $clog2(HALF) : 1;
  localparam int unsigned BW   = $clog2(FRAME_BITS + 1);

  rx_state_e      state;
  logic [HW-1:0]  half_cnt;
  logic [BW-1:0]  bit_cnt;

  wire start_check = (state == RX_START) && (half_cnt == HW'(HALF - 1));
  wire last_bit    = (bit_cnt == BW'(FRAME_BITS - 1));

  assign align     = start_check && !rin;
  assign shift_en  = (state == RX_DATA) && slow_tick;
  assign start_bit = (state == RX_IDLE);
  assign busy      = (state != RX_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= RX_IDLE;
      half_cnt      <= '0;
      bit_cnt       <= '0;
      check_compare <= 1'b0;
      frame_err     <= 1'b0;
      noise_rej     <= 1'b0;
    end else begin
      check_compare <= 1'b0;
      frame_err     <= 1'b0;
      noise_rej     <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          half_cnt <= '0;
          bit_cnt  <= '0;
          if (!rin) state <= RX_START;
        end
        RX_START: begin
          half_cnt <= half_cnt + 1'b1;
          if (start_check) begin
            if (!rin) begin
              state   <= RX_DATA;
              bit_cnt <= '0;
            end else begin
              state     <= RX_IDLE;
              noise_rej <= 1'b1;
            end
          end
        end
        RX_DATA: begin
          if (slow_tick) begin
            bit_cnt <= bit_cnt + 1'b1;
            if (last_bit) begin
              state         <= RX_IDLE;
              check_compare <= rin;
              frame_err     <= !rin;
            end
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

  // The two end-of-frame outcomes exclude each other.
  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n)
    !(check_compare && frame_err));
  // The divider is only re-phased while a start bit is being checked.
  a_align_in_start: assert property (@(posedge clk) disable iff (!rst_n)
    align |-> state == RX_START);

endmodule
