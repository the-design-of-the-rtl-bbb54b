// tb_fringe_rotator_top: end-to-end test of one fringe rotator unit at its
// full size (50 MHz clock, 18-bit rate multiplier, /50, /500).
//
// The testbench plays the part of the oscillator system (a 100 kHz
// reference made from the clock: 500 clocks, high for 250) and of the
// monitor and control link (two 24-bit words sent serially, MSB first,
// then a set request). Settings come from the same rules the control
// computer would use: the rate word is round(offset * 2^18 / 500) and
// the phase number n_p is coded as three base-5 digits and two bits.
//
// Three settings are applied in turn:
//   1. sign 1, M = 2^18-1 (+500 Hz): one full rate-multiplier cycle
//      (2^20 clocks), so every gated pulse train is exercised;
//   2. sign 0, M = 58196 (-111 Hz), loaded while the unit is running,
//      with the phase switch toggled;
//   3. M = 0 (no offset).
// After each load the counter must show n_p. Every clock the counter is
// compared with an independent model, n_p + t + s*E(t) modulo 500, where
// E(t) = floor((P + 25)/50) and P is the rate-multiplier pulse count
// after floor((t+1)/4) steps, summed over the set rate bits as
// floor((k + 2^m)/2^(m+1)); the counter may lag the model by one added or
// removed count (the pipeline delay of the pulse path). fringe_out and
// led_n are checked against the counter and reference, and the number of
// output cycles against the offset frequency. Each mechanism (added
// count, removed count, reference-aligned load, reload while running,
// phase switch, LED lit) is counted and must occur. Watchdog included.
module tb_fringe_rotator_top;
  logic clk = 1'b0, rst_n = 1'b0, ref_100k = 1'b0;
  logic ser_bit_valid = 1'b0, ser_bit = 1'b0, ser_word_load = 1'b0, ser_word_sel = 1'b0;
  logic set_req = 1'b0, phase_switch = 1'b0;
  logic fringe_out, led_n, load_pulse;
  logic [8:0] phase_count;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_load = 0, n_reload = 0, n_psw = 0, n_led = 0;
  longint tclk = 0;

  fringe_rotator_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  always @(posedge clk) begin
    tclk <= tclk + 1;
    ref_100k <= ((tclk + 1) % 500) < 250;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  function automatic longint rm_pulses(logic [17:0] m_rate, longint k);
    longint s = 0;
    for (int m = 0; m < 18; m++)
      if (m_rate[17-m]) s += (k + (64'd1 << m)) >> (m + 1);
    return s;
  endfunction

  task automatic send_word(logic [23:0] w, logic sel);
    for (int i = 23; i >= 0; i--) begin
      ser_bit = w[i]; ser_bit_valid = 1'b1;
      @(negedge clk);
      ser_bit_valid = 1'b0;
      @(negedge clk);
    end
    ser_word_sel = sel; ser_word_load = 1'b1;
    @(negedge clk);
    ser_word_load = 1'b0;
  endtask

  // Apply one setting and follow it for run_clocks clocks.
  task automatic apply_and_run(logic sgn, logic [17:0] m_rate, int np, longint run_clocks,
                               bit toggle_switch);
    logic [10:0] pbits;
    int a, c, d, e, f, exp_n, prev, delta, rises, exp_rises, k_e;
    longint t, p, e_cnt;
    logic prev_out;
    a = np / 100; c = (np % 100) / 20; d = (np % 20) / 4; e = (np % 4) / 2; f = np % 2;
    pbits = {3'(a), 3'(c), 3'(d), 1'(e), 1'(f)};
    send_word({sgn, m_rate, 5'b0}, 1'b0);
    send_word({pbits, 13'b0}, 1'b1);
    set_req = 1'b1; @(negedge clk); set_req = 1'b0;
    while (!load_pulse) @(negedge clk);
    // load_pulse seen: check that it came 3 clocks after a reference rise
    checks++;
    if ((tclk % 500) != 3) fail($sformatf("load %0d clocks into the reference cycle", tclk % 500));
    if (n_load > 0) n_reload++;   // applied while the previous setting runs
    n_load++;
    @(negedge clk);
    checks++;
    if (int'(phase_count) != np) fail($sformatf("counter %0d after load, expected n_p=%0d", phase_count, np));
    prev = int'(phase_count);
    prev_out = fringe_out;
    rises = 0;
    for (t = 1; t <= run_clocks; t++) begin
      if (toggle_switch && (t % 100000) == 0) begin
        phase_switch = ~phase_switch;
        n_psw++;
      end
      @(negedge clk);
      // counter against the model
      p = rm_pulses(m_rate, (t + 1) / 4);
      e_cnt = (p + 25) / 50;
      exp_n = int'((longint'(np) + t + (sgn ? e_cnt : -e_cnt) + 64'd500 * 64'd100000) % 500);
      checks++;
      if (int'(phase_count) != exp_n &&
          int'(phase_count) != (sgn ? (exp_n + 499) % 500 : (exp_n + 1) % 500))
        fail($sformatf("t=%0d counter %0d model %0d", t, phase_count, exp_n));
      delta = (int'(phase_count) - prev + 500) % 500;
      if (delta == 2) n_add++;
      if (delta == 0) n_sub++;
      // output waveform follows the counter one clock later
      checks++;
      if (fringe_out !== ((prev < 250) ^ phase_switch)) fail($sformatf("t=%0d fringe_out", t));
      checks++;
      if (led_n !== !((prev < 250) || ref_100k)) fail($sformatf("t=%0d led_n", t));
      if (!led_n) n_led++;   // LED lit
      if (fringe_out && !prev_out && !(toggle_switch && (t % 100000) == 0)) rises++;
      prev_out = fringe_out;
      prev = int'(phase_count);
    end
    // number of output cycles against the offset frequency
    exp_rises = int'((run_clocks + (sgn ? e_cnt : -e_cnt)) / 500);
    checks++;
    if (rises < exp_rises - 2 || rises > exp_rises + 2)
      fail($sformatf("%0d output cycles, expected about %0d", rises, exp_rises));
    k_e = int'(e_cnt);
    $display("setting sign=%0d M=%0d n_p=%0d: %0d clocks, %0d rate pulses, %0d output cycles",
             sgn, m_rate, np, run_clocks, k_e, rises);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    apply_and_run(1'b1, 18'h3FFFF, 137, 64'd1 << 20, 1'b0);
    apply_and_run(1'b0, 18'd58196, 413, 300000, 1'b1);
    apply_and_run(1'b1, 18'd0, 0, 5000, 1'b0);
    checks++; if (n_add == 0)   fail("no count was added");
    checks++; if (n_sub == 0)   fail("no count was removed");
    checks++; if (n_load != 3)  fail("not every setting was loaded");
    checks++; if (n_reload == 0) fail("no reload while running");
    checks++; if (n_psw == 0)   fail("phase switch never used");
    checks++; if (n_led == 0)   fail("LED never lit");
    $display("mechanisms: added=%0d removed=%0d loads=%0d reloads=%0d phase_switches=%0d led_clocks=%0d",
             n_add, n_sub, n_load, n_reload, n_psw, n_led);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
