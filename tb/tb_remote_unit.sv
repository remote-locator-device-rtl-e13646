// tb_remote_unit: end-to-end test of the remote unit at its default
// parameters (preset ID C8h, 16x oversampling, clk/4 tone), driven by a
// behavioural model of the base station's serial output.
//
// Scenarios, each counted, and each must occur at least once:
//   other_id   frames for other units leave the alert off
//   alert      a matching frame sets the latch, 156 clocks after the line
//              falls, and ttl_out[1] toggles at clk/4
//   burst      the firmware's alert of 20 back-to-back frames for ID 37h
//              (sent inverted, C8h on the line) is received 20 times
//   base_off   the all-zero reset frame clears the alert
//   button_off the alert-off button clears the alert
//   noise      a short low glitch is rejected
//   frame_err  a frame with a low stop bit is dropped
//   disabled   with enable low, no frame reaches the register
//   rate_ok    transmitters 3 % slow and fast are still received
//   rate_bad   a transmitter 12.5 % slow is not (bits are missed)
module tb_remote_unit;
  logic clk = 1'b0;
  logic rst_n, enable, alert_off;
  logic txd;
  logic [1:0] ttl_out;
  logic latch_out, slow_clk, check_compare, compare_out, frame_err, noise_rej;
  logic start_bit, busy;
  logic [8:0] id_q;

  int checks = 0, failures = 0;
  int n_cc = 0, n_fe = 0, n_nr = 0, n_set = 0;
  int c_other = 0, c_alert = 0, c_burst = 0, c_base_off = 0, c_button_off = 0;
  int c_noise = 0, c_frame_err = 0, c_disabled = 0, c_rate_ok = 0, c_rate_bad = 0;

  always #5 clk = ~clk;

  remote_unit dut (
    .clk, .rst_n, .rin(txd), .enable, .alert_off,
    .ttl_out, .latch_out, .id_q, .slow_clk,
    .check_compare, .compare_out, .frame_err, .noise_rej, .start_bit, .busy
  );

  base_unit_tx u_base (.clk, .txd);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Event counters, and: the latch may only rise after a matching frame.
  logic latch_d = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (check_compare) n_cc++;
      if (frame_err) n_fe++;
      if (noise_rej) n_nr++;
      if (latch_out && !latch_d) begin
        n_set++;
        checks++;
        if (id_q != {8'hC8, 1'b1}) begin
          failures++;
          $display("FAIL: latch rose with id_q=%b", id_q);
        end
      end
    end
    latch_d <= latch_out;
  end

  task automatic expect_silent(string what);
    check(!latch_out && ttl_out == 2'b00, {what, ": alert is on"});
  endtask

  task automatic clear_by_button();
    @(negedge clk);
    alert_off = 1'b1;
    repeat (4) @(negedge clk);
    alert_off = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int lat, cc0, fe0, nr0, rises;
    logic p;
    rst_n = 1'b0;
    enable = 1'b1;
    alert_off = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    u_base.idle(3.0);
    expect_silent("after reset");

    // Frames for other units.
    cc0 = n_cc;
    u_base.send_alert(8'h12, 3);
    u_base.send_code(8'h35);
    u_base.send_code(8'hC9);
    u_base.idle(2.0);
    check(n_cc - cc0 == 5, $sformatf("%0d of 5 frames checked", n_cc - cc0));
    check(id_q == {8'hC9, 1'b1}, $sformatf("id_q=%b after C9h", id_q));
    expect_silent("other IDs");
    if (!latch_out) c_other++;

    // One matching frame: latency and tone.
    fork
      u_base.send_code(8'hC8);
      begin
        @(negedge txd);
        lat = 0;
        while (!latch_out && lat < 400) begin
          @(negedge clk);
          lat++;
        end
      end
    join
    check(lat == 156, $sformatf("alert latency %0d clocks, expected 156", lat));
    check(latch_out, "matching frame did not set the alert");
    p = ttl_out[1];
    rises = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (ttl_out[1] && !p) rises++;
      p = ttl_out[1];
    end
    check(rises == 100, $sformatf("ttl_out[1] rose %0d times in 400 clocks", rises));
    if (latch_out && rises == 100) c_alert++;

    // Base station's off frame.
    u_base.send_all_off();
    u_base.idle(1.0);
    expect_silent("after the reset frame");
    if (!latch_out) c_base_off++;

    // The firmware's alert: ID 37h, inverted on the line, 20 times.
    cc0 = n_cc;
    u_base.send_alert(8'h37, 20);
    u_base.idle(1.0);
    check(n_cc - cc0 == 20, $sformatf("burst: %0d of 20 frames checked", n_cc - cc0));
    check(latch_out, "burst did not set the alert");
    if (latch_out && n_cc - cc0 == 20) c_burst++;

    // The remote's own button.
    clear_by_button();
    expect_silent("after the button");
    if (!latch_out) c_button_off++;
    u_base.idle(2.0);
    expect_silent("button release");

    // A glitch shorter than half a bit.
    nr0 = n_nr;
    cc0 = n_cc;
    u_base.glitch(5);
    u_base.idle(2.0);
    check(n_nr - nr0 == 1 && n_cc == cc0, "glitch not rejected");
    if (n_nr - nr0 == 1) c_noise++;

    // A matching frame with a low stop bit.
    fe0 = n_fe;
    cc0 = n_cc;
    u_base.send_code(8'hC8, 1'b0);
    u_base.idle(2.0);
    check(n_fe - fe0 == 1 && n_cc == cc0, "bad stop bit not reported");
    expect_silent("bad stop bit");
    if (n_fe - fe0 == 1 && !latch_out) c_frame_err++;

    // Register disabled: a matching frame is framed but never captured.
    enable = 1'b0;
    u_base.send_code(8'hC8);
    u_base.idle(1.0);
    check(id_q != {8'hC8, 1'b1}, "register shifted while disabled");
    expect_silent("disabled");
    if (!latch_out) c_disabled++;
    enable = 1'b1;

    // Rate tolerance: 3 % slow and 3 % fast transmitters.
    u_base.bit_clks = 16.48;
    u_base.send_code(8'hC8);
    u_base.idle(1.0);
    check(latch_out, "3 % slow transmitter not received");
    if (latch_out) c_rate_ok++;
    u_base.send_all_off();
    u_base.idle(1.0);
    expect_silent("reset frame at 3 % slow");
    u_base.bit_clks = 15.52;
    u_base.send_code(8'hC8);
    u_base.idle(1.0);
    check(latch_out, "3 % fast transmitter not received");
    if (latch_out) c_rate_ok++;
    clear_by_button();

    // A transmitter 12.5 % slow: the receiver's mid-bit samples drift by
    // 2 clocks a bit and the stop bit is sampled in the last data bit.
    u_base.bit_clks = 18.0;
    u_base.send_code(8'hC8);
    u_base.idle(2.0);
    expect_silent("12.5 % slow transmitter");
    if (!latch_out) c_rate_bad++;
    u_base.bit_clks = 16.0;
    // The low last data bit was taken for a new start bit; let that false
    // frame run out on the idle line before sending again.
    u_base.idle(12.0);
    check(!busy, "receiver did not return to idle");

    // After all that the unit still works.
    u_base.send_alert(8'h37, 2);
    u_base.idle(1.0);
    check(latch_out, "final alert");
    check(n_set >= 4, $sformatf("latch rose %0d times", n_set));

    check(c_other > 0, "other_id never happened");
    check(c_alert > 0, "alert never happened");
    check(c_burst > 0, "burst never happened");
    check(c_base_off > 0, "base_off never happened");
    check(c_button_off > 0, "button_off never happened");
    check(c_noise > 0, "noise never happened");
    check(c_frame_err > 0, "frame_err never happened");
    check(c_disabled > 0, "disabled never happened");
    check(c_rate_ok == 2, "rate_ok did not happen twice");
    check(c_rate_bad > 0, "rate_bad never happened");
    $display("other_id=%0d alert=%0d burst=%0d base_off=%0d button_off=%0d noise=%0d",
             c_other, c_alert, c_burst, c_base_off, c_button_off, c_noise);
    $display("frame_err=%0d disabled=%0d rate_ok=%0d rate_bad=%0d frames=%0d",
             c_frame_err, c_disabled, c_rate_ok, c_rate_bad, u_base.frames_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
