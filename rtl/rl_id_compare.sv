// rl_id_compare: compares the received frame with the unit's preset ID.
//
// Each of the eight data flip-flops is compared with its bit of preset_id
// (bit 7 against the first bit received) and the stop-bit position must be
// high; compare_out is high when all nine agree. reset_code is high when the
// register holds the base unit's "all alerts off" frame, eight zero data bits
// and the stop bit. Both are gated with check_compare, so they are only acted
// on in the cycle after a frame with a good stop bit has been received:
// set_alert and clear_alert are one-cycle pulses for the tone generator.
// The comparison against a preset ID and the reset code 9'b0_0000_0001
// follow the source design. Purely combinational.
module rl_id_compare
  import rl_pkg::*;
(
  input  logic [FRAME_BITS-1:0] q,              // shift register contents
  input  logic [DATA_BITS-1:0]  preset_id,      // this unit's ID
  input  logic                  check_compare,  // frame just completed
  output logic                  compare_out,    // q equals {preset_id, 1}
  output logic                  set_alert,      // matching frame received
  output logic                  clear_alert     // reset-code frame received
);

  logic [FRAME_BITS-1:0] bit_eq;

  // One equality per flip-flop, then all of them together.
  always_comb begin
    bit_eq      = ~(q ^ {preset_id, 1'b1});
    compare_out = &bit_eq;
    set_alert   = check_compare && compare_out;
    clear_alert = check_compare && (q == RESET_CODE);
  end

endmodule
