// tb_phase_set_sync: self-checking test of the reference-synchronised
// load. A 100 kHz-like reference (period 500 clocks, high for 250) runs;
// requests are given at random points of its cycle, sometimes twice.
// Each request must give exactly one load pulse, one clock wide, in the
// clock that follows the third clock edge after the reference rises, and
// no load may appear without a request. Watchdog included.
module tb_phase_set_sync;
  logic clk = 1'b0, rst_n = 1'b0, ref_100k = 1'b0, set_req = 1'b0, load;
  int checks = 0, failures = 0, loads = 0, t = 0, ref_t = 0;

  phase_set_sync dut (.*);

  always #5 clk = ~clk;

  // reference changes just after a clock edge; ref_t: time of last rise
  always @(posedge clk) begin
    t <= t + 1;
    ref_100k <= ((t + 1) % 500) < 250;
    if (((t + 1) % 500) == 0) ref_t <= t + 1;
  end

  initial begin
    int wait_cycles, seen;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (600) @(negedge clk);
    for (int k = 0; k < 60; k++) begin
      repeat ($urandom % 700) @(negedge clk);
      checks++;
      if (load) begin failures++; $display("FAIL load without request"); end
      set_req = 1'b1; @(negedge clk); set_req = 1'b0;
      if (k % 4 == 0) begin @(negedge clk); set_req = 1'b1; @(negedge clk); set_req = 1'b0; end
      seen = 0;
      for (wait_cycles = 0; wait_cycles < 1200; wait_cycles++) begin
        if (load) begin
          seen++;
          checks++;
          if (t - ref_t != 3) begin
            failures++; $display("FAIL load %0d clocks after reference edge", t - ref_t);
          end
        end
        @(negedge clk);
      end
      checks++;
      if (seen != 1) begin failures++; $display("FAIL %0d loads for one request", seen); end
      loads += seen;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
