// tb_output_stage: exhaustive check of the phase-switch gate and the LED
// drive: fringe_out is wave for phase_switch 0 and its inverse for 1, and
// led_n (active-low LED drive) is high, LED dark, only when wave and the
// reference are both low.
module tb_output_stage;
  logic wave, phase_switch, ref_100k, fringe_out, led_n;
  int checks = 0, failures = 0;

  output_stage dut (.*);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {wave, phase_switch, ref_100k} = 3'(i);
      #1;
      checks++;
      if (fringe_out !== (phase_switch ? !wave : wave)) begin
        failures++; $display("FAIL fringe_out for %b", 3'(i));
      end
      checks++;
      if (led_n !== (!wave && !ref_100k)) begin
        failures++; $display("FAIL led_n for %b", 3'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
