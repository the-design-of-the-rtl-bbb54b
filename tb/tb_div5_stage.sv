// tb_div5_stage: self-checking test of one divide-by-five stage.
// Random count enables and presets (0..4, and now and then 5..7) are
// applied; a reference state must match q, cout must be high exactly when
// an enabled count leaves state 4 (or an out-of-range state), and the
// stage must divide a steady enable by exactly five. Watchdog included.
module tb_div5_stage;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, cin = 1'b0, cout;
  logic [2:0] preset = '0, q;
  int checks = 0, failures = 0, v = 0, couts = 0;

  div5_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      load   = ($urandom % 50) == 0;
      preset = (($urandom % 10) == 0) ? 3'($urandom) : 3'($urandom % 5);
      cin    = 1'($urandom);
      #1;
      checks++;
      if (cout !== (!load && cin && v >= 4)) begin
        failures++;
        if (failures < 5) $display("FAIL cout at %0d", i);
      end
      @(negedge clk);
      if (load) v = int'(preset);
      else if (cin) v = (v >= 4) ? 0 : v + 1;
      checks++;
      if (int'(q) != v) begin
        failures++;
        if (failures < 5) $display("FAIL q=%0d expected %0d", q, v);
      end
    end
    // steady enable: one carry per five clocks
    load = 1'b1; preset = 3'd0; @(negedge clk); load = 1'b0; cin = 1'b1;
    repeat (500) begin #1; if (cout) couts++; @(negedge clk); end
    checks++;
    if (couts != 100) begin failures++; $display("FAIL %0d carries in 500 counts", couts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
