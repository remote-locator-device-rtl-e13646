// tb_rl_shift_reg: checks the nine-bit receive shift register against a
// reference queue. Random shift strobes, enable and data; the register must
// shift toward its top bit only when both strobe and enable are high.
module tb_rl_shift_reg;
  localparam int W = 9;

  logic clk = 1'b0;
  logic rst_n, enable, shift_en, din;
  logic [W-1:0] q, model;
  int checks = 0, failures = 0, shifts = 0;

  always #5 clk = ~clk;

  rl_shift_reg #(.WIDTH(W)) dut (.*);

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
    rst_n = 1'b0;
    enable = 1'b0;
    shift_en = 1'b0;
    din = 1'b0;
    repeat (2) @(negedge clk);
    check(q == '0, "reset value");
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      enable   = ($urandom_range(0, 3) != 0);
      shift_en = ($urandom_range(0, 1) != 0);
      din      = $urandom_range(0, 1) != 0;
      @(negedge clk);
      if (enable && shift_en) begin
        for (int b = W - 1; b > 0; b--) model[b] = model[b - 1];
        model[0] = din;
        shifts++;
      end
      check(q == model, $sformatf("q=%b expected %b", q, model));
    end
    check(shifts > 100, "too few shifts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
