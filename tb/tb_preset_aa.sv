// tb_preset_aa: a remote unit configured with preset ID AAh (10101010),
// the configuration of the source's compare-circuit timing study. A frame
// whose data bits are 10101010 on the line must set the alert; the
// neighbouring codes 55h, ABh and 2Ah must not; the reset frame must clear
// it.
module tb_preset_aa;
  logic clk = 1'b0;
  logic rst_n, txd, latch_out;
  logic [1:0] ttl_out;
  logic [8:0] id_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  remote_unit #(.PRESET_ID(8'hAA)) dut (
    .clk, .rst_n, .rin(txd), .enable(1'b1), .alert_off(1'b0),
    .ttl_out, .latch_out, .id_q, .slow_clk(),
    .check_compare(), .compare_out(), .frame_err(), .noise_rej(),
    .start_bit(), .busy()
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    u_base.idle(2.0);
    u_base.send_code(8'h55);
    u_base.send_code(8'hAB);
    u_base.send_code(8'h2A);
    u_base.idle(1.0);
    check(!latch_out, "alert set by another code");
    check(id_q == {8'h2A, 1'b1}, $sformatf("id_q=%b", id_q));
    u_base.send_code(8'hAA);
    u_base.idle(1.0);
    check(latch_out, "AAh did not set the alert");
    check(id_q == {8'hAA, 1'b1}, $sformatf("id_q=%b", id_q));
    u_base.send_all_off();
    u_base.idle(1.0);
    check(!latch_out && ttl_out == 2'b00, "reset frame did not clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
