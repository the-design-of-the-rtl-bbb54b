// tb_pulse_divider: self-checking test of the pulse divider at DIV = 50.
// Random input pulses are applied; after every clock the number of
// rising edges of out_level must be floor((P + 25) / 50) and the number
// of out_pulse strobes floor(P / 50), P being the input pulses so far.
// A clear in the middle restarts the count. Watchdog included.
module tb_pulse_divider;
  localparam int unsigned DIV = 50;
  localparam longint LDIV = DIV;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_pulse = 1'b0;
  logic out_level, out_pulse, lvl_d;
  int checks = 0, failures = 0;
  longint p = 0, rises = 0, tcs = 0;

  pulse_divider #(.DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_counts();
    checks++;
    if (rises != (p + LDIV / 2) / LDIV || tcs != p / LDIV) begin
      failures++;
      if (failures < 5) $display("FAIL P=%0d rises=%0d tcs=%0d", p, rises, tcs);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    lvl_d = out_level;
    for (int phase = 0; phase < 2; phase++) begin
      p = 0; rises = 0; tcs = 0;
      for (int i = 0; i < 20000; i++) begin
        in_pulse = ($urandom % 3) != 0;
        #1;
        if (out_pulse) tcs++;
        if (in_pulse) p++;
        @(negedge clk);
        if (out_level && !lvl_d) rises++;
        lvl_d = out_level;
        check_counts();
      end
      in_pulse = 1'b0;
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      lvl_d = out_level;
      checks++;
      if (out_level) begin failures++; $display("FAIL level after clear"); end
    end
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
