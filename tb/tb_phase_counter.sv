// tb_phase_counter: self-checking test of the divide-by-500 counter.
// Random phase words (digits 0..4 and two bits) are loaded with a random
// sign; between loads b pulses arrive at random. A reference number n is
// set to 100*d1 + 20*d2 + 4*d3 + 2*B10 + B11 on load and otherwise
// advances by 1, by 2 (b, sign 1) or by 0 (b, sign 0) modulo 500; count
// must equal n and wave must equal (n < 250) one clock later. A steady
// run checks that 500 clocks give exactly one output cycle. Watchdog.
module tb_phase_counter;
  import fringe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, sign_in = 1'b0, b = 1'b0;
  logic [10:0] phase_bits = '0;
  logic [8:0]  count;
  logic        wave;
  int checks = 0, failures = 0;
  int n = 0, sgn = 0, prev_n = 0, rises = 0;
  logic wave_d;

  phase_counter dut (.*);

  always #5 clk = ~clk;

  function automatic logic [10:0] random_phase(output int np);
    int a = $urandom % 5, c = $urandom % 5, d = $urandom % 5;
    int e = $urandom % 2, f = $urandom % 2;
    np = 100 * a + 20 * c + 4 * d + 2 * e + f;
    return {3'(a), 3'(c), 3'(d), 1'(e), 1'(f)};
  endfunction

  initial begin
    int np;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 100000; i++) begin
      load = ($urandom % 3000) == 0 || i == 0;
      b    = ($urandom % 8) == 0;
      phase_bits = random_phase(np);
      sign_in = 1'($urandom);
      @(negedge clk);
      prev_n = n;
      if (load) begin n = np; sgn = int'(sign_in); end
      else n = (n + (b ? (sgn != 0 ? 2 : 0) : 1)) % 500;
      checks++;
      if (int'(count) != n) begin
        failures++;
        if (failures < 5) $display("FAIL at %0d: count=%0d expected %0d", i, count, n);
      end
      if (i > 0) begin
        checks++;
        if (wave !== (prev_n < 250)) begin failures++; if (failures < 5) $display("FAIL wave at %0d", i); end
      end
    end
    // steady counting, no b: one rising edge of wave per 500 clocks
    load = 1'b0; b = 1'b0;
    wave_d = wave;
    repeat (5000) begin @(negedge clk); if (wave && !wave_d) rises++; wave_d = wave; end
    checks++;
    if (rises != 10) begin failures++; $display("FAIL %0d output cycles in 5000 clocks", rises); end
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
