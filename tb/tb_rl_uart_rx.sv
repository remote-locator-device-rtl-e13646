// tb_rl_uart_rx: checks start-bit detection and framing of the receiver,
// with rl_clkgen supplying the mid-bit ticks.
//
// The line is driven directly (already synchronous) with 16 clocks per bit.
// Counting rising edges from the first one that sees the start bit low
// (edge 0), the test expects the start check at edge 8, the nine shift
// strobes at edges 24, 40, ..., 152 taking exactly the bits sent, and
// check_compare in the cycle after edge 152 when the stop bit is high, or
// frame_err when it is low. A short low glitch must give noise_rej and no
// strobes.
module tb_rl_uart_rx;
  localparam int OS = 16;

  logic clk = 1'b0;
  logic rst_n, rin, slow_tick, align, shift_en;
  logic check_compare, frame_err, noise_rej, start_bit, busy;
  int checks = 0, failures = 0;
  int n_ok = 0, n_ferr = 0, n_noise = 0;

  always #5 clk = ~clk;

  rl_clkgen #(.DIV(OS)) u_clk (.clk, .rst_n, .align, .slow_tick, .slow_clk());
  rl_uart_rx #(.OVERSAMPLE(OS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record every strobe and pulse with the edge count since the frame began.
  int   edge_no;
  int   strobe_at[$];
  logic strobe_bit[$];
  int   cc_at, fe_at, nr_at;

  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    if (shift_en) begin
      strobe_at.push_back(edge_no);
      strobe_bit.push_back(rin);
    end
    if (check_compare) cc_at <= edge_no;
    if (frame_err) fe_at <= edge_no;
    if (noise_rej) nr_at <= edge_no;
  end

  // Drive a frame; rin changes on falling edges. The first rising edge after
  // the start bit begins is edge 0.
  task automatic frame(logic [7:0] code, bit stop);
    logic [9:0] bits;
    bits = {1'b0, code, stop};
    strobe_at.delete();
    strobe_bit.delete();
    cc_at = -1;
    fe_at = -1;
    nr_at = -1;
    @(negedge clk);
    edge_no = 0;
    for (int b = 9; b >= 0; b--) begin
      rin = bits[b];
      repeat (OS) @(negedge clk);
    end
    rin = 1'b1;
    repeat (3 * OS) @(negedge clk);
    check(strobe_at.size() == 9, $sformatf("%0d strobes", strobe_at.size()));
    for (int k = 0; k < strobe_at.size() && k < 9; k++) begin
      check(strobe_at[k] == OS / 2 + OS * (k + 1),
            $sformatf("strobe %0d at edge %0d", k, strobe_at[k]));
      check(strobe_bit[k] == bits[8 - k], $sformatf("strobe %0d took %b", k, strobe_bit[k]));
    end
    if (stop) begin
      check(cc_at == OS / 2 + 9 * OS + 1, $sformatf("check_compare at %0d", cc_at));
      check(fe_at == -1, "frame_err on a good frame");
      n_ok++;
    end else begin
      check(fe_at == OS / 2 + 9 * OS + 1, $sformatf("frame_err at %0d", fe_at));
      check(cc_at == -1, "check_compare on a bad frame");
      n_ferr++;
    end
    check(!busy && start_bit, "not idle after the frame");
  endtask

  initial begin
    rst_n = 1'b0;
    rin = 1'b1;
    edge_no = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (37) @(negedge clk);   // let the divider run to an arbitrary phase
    for (int i = 0; i < 30; i++) begin
      frame(8'($urandom), 1'b1);
      repeat ($urandom_range(0, 23)) @(negedge clk);
    end
    frame(8'hC8, 1'b1);
    frame(8'h00, 1'b1);
    frame(8'h5A, 1'b0);
    frame(8'hFF, 1'b0);
    // glitches shorter than half a bit
    for (int g = 1; g < OS / 2 - 1; g++) begin
      strobe_at.delete();
      nr_at = -1;
      @(negedge clk);
      edge_no = 0;
      rin = 1'b0;
      repeat (g) @(negedge clk);
      rin = 1'b1;
      repeat (3 * OS) @(negedge clk);
      check(nr_at == OS / 2 + 1, $sformatf("glitch of %0d: noise_rej at %0d", g, nr_at));
      check(strobe_at.size() == 0, "strobes after a glitch");
      n_noise++;
    end
    check(n_ok > 0 && n_ferr > 0 && n_noise > 0, "a case never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
