// output_stage: phase-switch gate and fringe-rate indicator drive.
//
// fringe_out is the counter waveform passed either unchanged (AND gate,
// phase_switch = 0) or inverted (NAND gate, phase_switch = 1), which
// shifts the 100 kHz output by 180 degrees for phase switching.
// led_n is the NOR of the waveform and the 100 kHz reference and drives
// the fringe-rate LED active low (the gate output sinks the LED current):
// the LED is dark only while both waveforms are low. In phase they are
// both low half the time, so the mean brightness is least; in antiphase
// the LED is always lit; between, it flickers at the fringe offset
// frequency. The active-low drive follows from the text's statement that
// the light is off when both are low. Feeding the LED from the waveform ahead of the
// phase switch is this design's choice. Purely combinational.
module output_stage (
  input  logic wave,
  input  logic phase_switch,
  input  logic ref_100k,
  output logic fringe_out,
  output logic led_n
);

  assign fringe_out = wave ^ phase_switch;
  assign led_n      = ~(wave | ref_100k);

endmodule
