// base_unit_tx: behavioural model of the base station's serial output.
//
// Not synthesizable. The base station is a microcontroller whose serial port
// sends the selected unit's ID over the radio link. Its firmware inverts the
// ID before sending, so the bits on the line are the complement of the ID;
// they are sent as one low start bit, the eight code bits with bit 7 first,
// and one high stop bit, on a line that idles high. An alert sends the same
// frame a number of times back to back (20 by default in the firmware).
//
// The bit period is bit_clks cycles of clk (16.0 matches the receiver's
// nominal rate; other real values model a transmitter running slow or fast).
// Bit boundaries are placed on falling clock edges at the rounded real
// positions, so a fractional period spreads its error evenly.
module base_unit_tx (
  input  logic clk,
  output logic txd
);
  real bit_clks = 16.0;
  real pos = 0.0;
  int  n = 0;
  int  frames_sent = 0;

  initial txd = 1'b1;

  always @(negedge clk) n++;

  // Hold the current line level for clks cycles of clk.
  task automatic hold(real clks);
    pos += clks;
    while (real'(n) < pos - 0.001) @(negedge clk);
  endtask

  task automatic sync_to_clock();
    @(negedge clk);
    pos = real'(n);
  endtask

  // Idle (high) for the given number of bit periods.
  task automatic idle(real bits);
    sync_to_clock();
    txd = 1'b1;
    hold(bits * bit_clks);
  endtask

  // One frame with the given line code (bit 7 first); stop_level lets a
  // test send a broken stop bit.
  task automatic send_code(logic [7:0] code, bit stop_level = 1'b1);
    sync_to_clock();
    txd = 1'b0;
    hold(bit_clks);
    for (int b = 7; b >= 0; b--) begin
      txd = code[b];
      hold(bit_clks);
    end
    txd = stop_level;
    hold(bit_clks);
    txd = 1'b1;
    frames_sent++;
  endtask

  // What the firmware does for an alert: invert the ID and send it
  // `repeats` times back to back.
  task automatic send_alert(logic [7:0] id, int repeats = 20);
    for (int r = 0; r < repeats; r++) send_code(~id);
  endtask

  // "All alerts off": a frame of eight zero data bits on the line.
  task automatic send_all_off(int repeats = 1);
    for (int r = 0; r < repeats; r++) send_code(8'h00);
  endtask

  // A low glitch of the given number of clock cycles.
  task automatic glitch(int clks);
    sync_to_clock();
    txd = 1'b0;
    hold(real'(clks));
    txd = 1'b1;
  endtask
endmodule
