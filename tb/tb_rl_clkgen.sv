// tb_rl_clkgen: checks the divide-by-16 bit-rate clock generator.
//
// Free running, slow_tick must come exactly every 16 clocks and slow_clk must
// be high for half of them. After align (pulsed at random phases) slow_tick
// must be high in the 16th cycle after the edge that sampled align, so that
// the logic it enables acts on edge 16. Outputs are sampled on the falling
// clock edge.
module tb_rl_clkgen;
  localparam int DIV = 16;

  logic clk = 1'b0;
  logic rst_n, align, slow_tick, slow_clk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rl_clkgen #(.DIV(DIV)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, now, high_cnt, gap;
    rst_n = 1'b0;
    align = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // free-running period and duty
    last = -1;
    now = 0;
    high_cnt = 0;
    for (int i = 0; i < 16 * DIV; i++) begin
      @(negedge clk);
      now++;
      if (slow_clk) high_cnt++;
      if (slow_tick) begin
        if (last >= 0) check(now - last == DIV, $sformatf("tick period %0d", now - last));
        last = now;
      end
    end
    check(last >= 0, "no tick while free running");
    check(high_cnt == 8 * DIV, $sformatf("slow_clk high %0d of %0d", high_cnt, 16 * DIV));
    // re-phasing at random points of the period
    for (int r = 0; r < 40; r++) begin
      repeat ($urandom_range(0, 40)) @(negedge clk);
      align = 1'b1;
      @(negedge clk);          // the edge in between sampled align
      align = 1'b0;
      gap = 0;
      while (!slow_tick && gap < 3 * DIV) begin
        @(negedge clk);
        gap++;
      end
      check(gap == DIV - 1, $sformatf("tick %0d cycles after align, expected %0d", gap, DIV - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
