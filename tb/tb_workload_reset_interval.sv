// tb_workload_reset_interval: runs the fringe rotator through a complete
// 2.5 s reset interval (125 million clocks) and parts of others at full size, with
// settings computed the way the control computer computes them.
//
// For an antenna at D wavelengths from the array centre, baseline
// direction (h, d), source at hour angle H0 and declination dec, and an
// interval of H1 radians of hour angle (high-lock case):
//   A = sin(dec) sin(d), B = cos(dec) cos(d) cos(H0-h),
//   C = cos(dec) cos(d) sin(H0-h)
//   initial phase  = -2 pi D (A + B + B H1^2/12), reduced to [0, 2 pi),
//                    n_p = round(phase * 500 / 2 pi) mod 500
//   offset (Hz)    = -w0 D (C + B H1/2)         (w0 = earth rotation rate)
//   rate word      = round(|offset| * 2^18 / 500), sign bit 1 if the
//                    offset is negative (the unit must raise its output
//                    frequency), 0 if positive.
// Case 1 runs a full 2.5 s interval; case 2 runs 1.0 s of one.
// Case 1 is the longest arm at 24 GHz (D = 1.68e6, cos d = 0.91) with the
// source on the equator six hours from the baseline meridian: the largest
// fringe frequency of normal operation, about 111 Hz. Case 2 scales D so
// that the offset is near the 500 Hz capability limit, with a source at
// declination 20 degrees so that the initial phase is not trivial.
//
// Case 3 uses the low-lock rule (initial phase 2 pi minus the high-lock
// value, sign bit inverted) for 0.5 s.
//
// Every 997 clocks the counter is compared with the exact pulse-count
// model (as in the end-to-end test), and the number of added/removed
// counts with the ideal linear phase 500 * offset * t: the difference
// must stay within 2 counts (1.44 degrees) over the whole interval.
module tb_workload_reset_interval;
  localparam real PI  = 3.14159265358979323846;
  localparam real W0  = 7.2921159e-5;       // earth rotation, rad/s
  localparam real FCLK = 50.0e6;
  localparam real T_INTERVAL = 2.5;         // seconds between resets

  logic clk = 1'b0, rst_n = 1'b0, ref_100k = 1'b0;
  logic ser_bit_valid = 1'b0, ser_bit = 1'b0, ser_word_load = 1'b0, ser_word_sel = 1'b0;
  logic set_req = 1'b0, phase_switch = 1'b0;
  logic fringe_out, led_n, load_pulse;
  logic [8:0] phase_count;
  int checks = 0, failures = 0;
  longint tclk = 0;

  fringe_rotator_top dut (.*);

  always #10 clk = ~clk;

  always @(posedge clk) begin
    tclk <= tclk + 1;
    ref_100k <= ((tclk + 1) % 500) < 250;
  end

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
    end
    ser_word_sel = sel; ser_word_load = 1'b1;
    @(negedge clk);
    ser_word_load = 1'b0;
  endtask

  task automatic run_case(string name, real d_wl, real cos_d, real dec_deg, real ha_deg,
                          bit low_lock, real seconds);
    real sin_d, dec, ha, h1, a, b, c, ph, off, ideal, dev, max_dev;
    int  np, dig100, dig20, dig4, m_int, exp_n;
    logic sgn;
    logic [17:0] m_rate;
    longint t, n_clocks, p, e_cnt;
    sin_d = $sqrt(1.0 - cos_d * cos_d);
    dec = dec_deg * PI / 180.0;
    ha  = ha_deg * PI / 180.0;
    h1  = W0 * T_INTERVAL;
    a = $sin(dec) * sin_d;
    b = $cos(dec) * cos_d * $cos(ha);
    c = $cos(dec) * cos_d * $sin(ha);
    ph  = -d_wl * (a + b + b * h1 * h1 / 12.0);        // in turns
    ph  = ph - $floor(ph);
    np  = int'($floor(ph * 500.0 + 0.5)) % 500;
    off = -W0 * d_wl * (c + b * h1 / 2.0);
    m_int = int'($floor((off < 0 ? -off : off) * 262144.0 / 500.0 + 0.5));
    m_rate = 18'(m_int);
    sgn = (off < 0);
    if (low_lock) begin          // phase 2 pi minus the high-lock one, sign inverted
      np  = (500 - np) % 500;
      sgn = ~sgn;
    end
    dig100 = np / 100; dig20 = (np % 100) / 20; dig4 = (np % 20) / 4;
    $display("%s: offset %f Hz, rate word %0d, sign %0d, n_p %0d", name, off, m_int, sgn, np);
    send_word({sgn, m_rate, 5'b0}, 1'b0);
    send_word({3'(dig100), 3'(dig20), 3'(dig4), 1'((np % 4) / 2), 1'(np % 2), 13'b0}, 1'b1);
    set_req = 1'b1; @(negedge clk); set_req = 1'b0;
    while (!load_pulse) @(negedge clk);
    @(negedge clk);
    checks++;
    if (int'(phase_count) != np) begin
      failures++; $display("FAIL counter %0d after load, n_p %0d", phase_count, np);
    end
    n_clocks = longint'(seconds * FCLK);
    max_dev = 0.0;
    t = 0;
    while (t + 997 <= n_clocks) begin
      #(997 * 20);               // 997 clock periods, still at a falling edge
      t += 997;
      p = rm_pulses(m_rate, (t + 1) / 4);
      e_cnt = (p + 25) / 50;
      exp_n = int'((longint'(np) + t + (sgn ? e_cnt : -e_cnt) + 64'd500 * 64'd1000000) % 500);
      checks++;
      if (int'(phase_count) != exp_n &&
          int'(phase_count) != (sgn ? (exp_n + 499) % 500 : (exp_n + 1) % 500)) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d counter %0d model %0d", t, phase_count, exp_n);
      end
      // deviation from the ideal linear phase, in counts of 0.72 degrees
      ideal = (off < 0 ? -off : off) * 500.0 * real'(t) / FCLK;
      dev = real'(e_cnt) - ideal;
      if (dev < 0.0) dev = -dev;
      checks++;
      if (dev > 2.0) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d phase %0d counts from linear (%f)", t, e_cnt, ideal);
      end
      if (dev > max_dev) max_dev = dev;
    end
    $display("%s: %0d clocks, %0d counts %s, largest deviation from linear phase %0.2f counts",
             name, t, e_cnt, sgn ? "added" : "removed", max_dev);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    run_case("longest arm, 24 GHz", 1.68e6, 0.91, 0.0, 90.0, 1'b0, T_INTERVAL);
    run_case("near 500 Hz limit", 1.68e6 * 4.9, 0.91, 20.0, -75.0, 1'b0, 1.0);
    run_case("low lock, 24 GHz", 1.68e6, 0.91, 35.0, 40.0, 1'b1, 0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (220_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
