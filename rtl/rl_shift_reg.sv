// rl_shift_reg: serial-in, parallel-out shift register for the received ID.
//
// On every clock in which shift_en and enable are both high, the register
// moves one place toward its top bit and takes din at bit 0. After a frame
// the first data bit received sits at q[WIDTH-1] and the stop bit at q[0].
// WIDTH is nine (eight data bits and the stop bit), as in the source design,
// whose register also shifts toward the top and also has an enable input.
// There it is clocked by the free-running slow clock; here it is clocked by
// clk and shifts on the receiver's mid-bit strobe, so each bit is taken
// exactly once and in its middle. q changes on the clock edge that sees the
// strobe.
module rl_shift_reg #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,    // external enable
  input  logic             shift_en,  // mid-bit strobe from the receiver
  input  logic             din,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   q <= '0;
    else if (enable && shift_en)  q <= {q[WIDTH-2:0], din};
  end

endmodule
