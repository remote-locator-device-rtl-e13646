// rl_pkg: constants and types shared by the remote-unit receiver.
//
// A frame on the serial line is one low start bit, eight data bits and one
// high stop bit. The receiver keeps the eight data bits and the stop bit in a
// nine-bit shift register, first-received bit at the top. The base unit turns
// every remote off by sending a frame whose data bits are all zero, which
// leaves 9'b0_0000_0001 in that register. The frame format, the nine-bit
// register and the reset code follow the source design; the state encoding
// of the receiver is this implementation's own.
package rl_pkg;

  localparam int unsigned DATA_BITS  = 8;
  localparam int unsigned FRAME_BITS = DATA_BITS + 1;  // data bits plus stop bit

  // Register contents that switch every remote's alert off.
  localparam logic [FRAME_BITS-1:0] RESET_CODE = 9'b0_0000_0001;

  // Receiver states: waiting for a falling edge, checking the start bit at
  // half a bit time, and counting the eight data bits and the stop bit.
  typedef enum logic [1:0] {
    RX_IDLE  = 2'd0,
    RX_START = 2'd1,
    RX_DATA  = 2'd2
  } rx_state_e;

endpackage
