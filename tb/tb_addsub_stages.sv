// tb_addsub_stages: self-checking test of the add/subtract counter stages.
// With random b, sign and occasional presets, a reference value v (mod 4)
// advances by 1, by 2 (b with sign 1) or by 0 (b with sign 0); q must
// equal v and carry must be high exactly when v + step reaches 4.
// The sign is applied only through load, as in the synthesizer. Watchdog.
module tb_addsub_stages;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, sign_in = 1'b0, b = 1'b0;
  logic [1:0] preset = '0, q;
  logic carry;
  int checks = 0, failures = 0;
  int v = 0, sgn = 0, step, n_add = 0, n_sub = 0;

  addsub_stages dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      load    = ($urandom % 200) == 0;
      preset  = 2'($urandom);
      sign_in = 1'($urandom);
      b       = ($urandom % 4) == 0;
      #1;
      if (load) step = -1;
      else      step = b ? (sgn != 0 ? 2 : 0) : 1;
      checks++;
      if (carry !== (step >= 0 && v + step >= 4)) begin
        failures++;
        if (failures < 5) $display("FAIL carry at %0d: v=%0d step=%0d", i, v, step);
      end
      if (!load && b) begin if (sgn != 0) n_add++; else n_sub++; end
      @(negedge clk);
      if (load) begin v = int'(preset); sgn = int'(sign_in); end
      else v = (v + step) % 4;
      checks++;
      if (int'(q) != v) begin
        failures++;
        if (failures < 5) $display("FAIL q at %0d: q=%0d expected %0d", i, q, v);
      end
    end
    checks++;
    if (n_add == 0 || n_sub == 0) begin failures++; $display("FAIL add or subtract never exercised"); end
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
