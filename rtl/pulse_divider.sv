// pulse_divider: divides a stream of one-clock input pulses by DIV.
//
// A counter runs 0..DIV-1, advancing on each in_pulse. out_level is high
// while the count is DIV/2 or more, giving one rising edge (and a square
// wave, of equal halves for even DIV) per DIV input pulses. out_pulse is
// high in the clock whose input pulse wraps the counter to 0.
// In the synthesizer it is the divide-by-50 after the rate multiplier
// (the text's k = 50) and the divide-by-4 that derives the 12.5 MHz
// rate-multiplier enable from 50 MHz. The duty cycle is this design's
// choice. clr returns the counter to 0.
// Timing: out_level is registered-state decode; out_pulse is combinational.
module pulse_divider #(
  parameter int unsigned DIV = 50
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic in_pulse,
  output logic out_level,
  output logic out_pulse
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] cnt;

  assign out_level = (cnt >= W'(DIV / 2));
  assign out_pulse = in_pulse & (cnt == W'(DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clr)   cnt <= '0;
    else if (out_pulse)  cnt <= '0;
    else if (in_pulse)   cnt <= cnt + W'(1);
  end

endmodule
