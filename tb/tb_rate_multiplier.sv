// tb_rate_multiplier: self-checking test of the binary rate multiplier.
// For several rate settings M it runs the full 2^18-step cycle with the
// enable high every clock and checks (1) that exactly M pulses come out,
// (2) that the running pulse count after k steps equals the sum over the
// set rate bits of the pulse-train counts floor((k + 2^m) / 2^(m+1)),
// worked out here independently, and (3) that no pulse appears while
// the enable is low. Ends with a TB_RESULT line; a watchdog stops it.
module tb_rate_multiplier;
  localparam int unsigned N = 18;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, load = 1'b0, pulse;
  logic [N-1:0] rate_in = '0;
  int checks = 0, failures = 0;

  rate_multiplier #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint expected_pulses(logic [N-1:0] m_rate, longint k);
    longint s = 0;
    for (int m = 0; m < N; m++)
      if (m_rate[N-1-m]) s += (k + (64'd1 << m)) >> (m + 1);
    return s;
  endfunction

  task automatic run_rate(logic [N-1:0] m_rate);
    longint k = 0, cnt = 0;
    int bad = 0;
    @(negedge clk); rate_in = m_rate; load = 1'b1;
    @(negedge clk); load = 1'b0; ce = 1'b1;
    for (k = 1; k <= (64'd1 << N); k++) @(negedge clk);
    ce = 1'b0;
  endtask

  // count pulses in every clock where ce is high (sampled mid-cycle)
  longint pcount = 0, steps = 0;
  int     mism = 0;
  logic [N-1:0] cur_rate;
  always @(negedge clk) begin
    if (load) begin pcount = 0; steps = 0; end
    else if (ce) begin
      pcount += (pulse ? 1 : 0);
      steps  += 1;
    end
    if (!ce && pulse) mism++;
    if (ce && (steps % 4093 == 17)) begin
      checks++;
      if (pcount != expected_pulses(cur_rate, steps)) begin
        failures++;
        if (failures < 5) $display("FAIL M=%0d after %0d steps: %0d pulses, expected %0d",
                                   cur_rate, steps, pcount, expected_pulses(cur_rate, steps));
      end
    end
  end

  initial begin
    logic [N-1:0] rates[6];
    rates[0] = 18'h3FFFF; rates[1] = 18'd58196; rates[2] = 18'd1;
    rates[3] = 18'h20000; rates[4] = 18'h15555; rates[5] = 18'(($urandom) & 18'h3FFFF);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (rates[i]) begin
      cur_rate = rates[i];
      run_rate(rates[i]);
      @(negedge clk);
      checks++;
      if (pcount != longint'(rates[i])) begin
        failures++;
        $display("FAIL M=%0d: %0d pulses in a full cycle", rates[i], pcount);
      end
      // enable low: no pulses for a while
      repeat (50) @(posedge clk);
    end
    checks++;
    if (mism != 0) begin failures++; $display("FAIL pulse while ce low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
