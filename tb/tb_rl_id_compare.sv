// tb_rl_id_compare: checks the ID comparator exhaustively over the data
// bits for several preset IDs: compare_out only for {preset, stop = 1},
// set_alert and clear_alert only while check_compare is high, and
// clear_alert only for eight zero data bits with a high stop bit.
module tb_rl_id_compare;
  logic [8:0] q;
  logic [7:0] preset_id;
  logic check_compare, compare_out, set_alert, clear_alert;
  int checks = 0, failures = 0;

  rl_id_compare dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] presets [4] = '{8'hC8, 8'hAA, 8'h35, 8'h01};
    bit exp_match, exp_clear;
    foreach (presets[p]) begin
      preset_id = presets[p];
      for (int v = 0; v < 512; v++) begin
        for (int c = 0; c < 2; c++) begin
          q = 9'(v);
          check_compare = c[0];
          #1;
          exp_match = (v[8:1] == int'(presets[p])) && v[0];
          exp_clear = (v == 1);
          check(compare_out == exp_match, $sformatf("compare_out q=%b id=%h", q, preset_id));
          check(set_alert == (exp_match && c[0]), $sformatf("set_alert q=%b c=%0d", q, c));
          check(clear_alert == (exp_clear && c[0]), $sformatf("clear_alert q=%b c=%0d", q, c));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
