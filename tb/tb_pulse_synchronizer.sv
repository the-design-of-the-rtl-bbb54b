// tb_pulse_synchronizer: self-checking test of the pulse synchronizer.
// A random square wave (each level held 2..20 clocks) drives the input.
// The expected b is worked out from the input history: b is high exactly
// when the input was sampled low three edges ago and high two edges ago.
// Also checks that b is never longer than one clock and that clr empties
// the pipeline. Watchdog included.
module tb_pulse_synchronizer;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_level = 1'b0, b;
  int checks = 0, failures = 0, edges = 0, pulses = 0;
  logic [3:0] hist = '0;   // hist[0] = input sampled at the latest edge

  pulse_synchronizer dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && !clr) hist <= {hist[2:0], in_level};
                        else               hist <= {4{in_level}};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      in_level = ~in_level;
      if (in_level) edges++;
      repeat (2 + $urandom % 19) begin
        @(negedge clk);
        checks++;
        if (b) pulses++;
        if (b !== (hist[1] & ~hist[2])) begin
          failures++;
          if (failures < 5) $display("FAIL at step %0d: b=%0b hist=%b", i, b, hist);
        end
      end
    end
    in_level = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (pulses != edges) begin failures++; $display("FAIL %0d pulses for %0d edges", pulses, edges); end
    in_level = 1'b1; @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0; in_level = 1'b1;
    repeat (3) begin @(negedge clk); checks++; if (b) begin failures++; $display("FAIL b after clr"); end end
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
