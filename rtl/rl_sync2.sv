// rl_sync2: two-flip-flop synchronizer for an asynchronous level input.
//
// The serial line from the radio receiver and the alert-off push button are
// not related to the receiver clock, so each passes through two flip-flops
// before any logic looks at it. The output follows the input two clock edges
// later. RESET_VAL is the value the output takes during reset (the idle level
// of the input). This stage is an implementation choice; the source design
// reads its inputs directly.
module rl_sync2 #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
