// tb_rl_tone_gen: checks the alert latch and the tone divider.
//
// A set pulse must raise latch_out on the next edge; ttl_out[1] must then be
// a square wave of period 4 clocks and ttl_out[0] of period 2. A reset-code
// pulse and the off button must each clear the latch and silence the
// outputs; a clear must win over a simultaneous set.
module tb_rl_tone_gen;
  logic clk = 1'b0;
  logic rst_n, set_alert, clear_alert, alert_off, latch_out;
  logic [1:0] ttl_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rl_tone_gen #(.DIV_BITS(2)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One set pulse, then 64 cycles of tone checked against a model counter.
  task automatic raise_and_check();
    int rises1, rises0;
    logic p1, p0;
    @(negedge clk);
    set_alert = 1'b1;
    @(negedge clk);
    set_alert = 1'b0;
    check(latch_out, "latch did not set");
    p1 = ttl_out[1];
    p0 = ttl_out[0];
    rises1 = 0;
    rises0 = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      check(ttl_out == 2'((i + 1) % 4), $sformatf("ttl_out=%0d at %0d", ttl_out, i));
      if (ttl_out[1] && !p1) rises1++;
      if (ttl_out[0] && !p0) rises0++;
      p1 = ttl_out[1];
      p0 = ttl_out[0];
    end
    check(rises1 == 16, $sformatf("ttl_out[1] rose %0d times in 64 clocks", rises1));
    check(rises0 == 32, $sformatf("ttl_out[0] rose %0d times in 64 clocks", rises0));
  endtask

  task automatic check_silent(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      check(!latch_out && ttl_out == 2'b00, "not silent");
    end
  endtask

  initial begin
    rst_n = 1'b0;
    set_alert = 1'b0;
    clear_alert = 1'b0;
    alert_off = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_silent(10);
    // set, then clear by the reset code
    raise_and_check();
    clear_alert = 1'b1;
    @(negedge clk);
    clear_alert = 1'b0;
    check(!latch_out, "reset code did not clear");
    @(negedge clk);
    check_silent(10);
    // set, then clear by the button
    raise_and_check();
    alert_off = 1'b1;
    @(negedge clk);
    alert_off = 1'b0;
    check(!latch_out, "button did not clear");
    @(negedge clk);
    check_silent(10);
    // set while the button is held: stays off
    alert_off = 1'b1;
    set_alert = 1'b1;
    @(negedge clk);
    set_alert = 1'b0;
    alert_off = 1'b0;
    check_silent(10);
    // latch holds with no further pulses
    raise_and_check();
    repeat (200) @(negedge clk);
    check(latch_out, "latch did not hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
