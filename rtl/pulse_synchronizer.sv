// pulse_synchronizer: makes one pulse B, exactly one 50 MHz clock period
// wide, for every rising edge of the divided rate-multiplier output.
//
// It follows the two flip-flop circuit of the fringe synthesizer: F1
// records that an input edge has arrived, F2 (whose D input is F1) copies
// it on the next clock and so gives a pulse aligned with the clock, after
// which F1 is cleared and F2 returns to zero on the following clock. In
// this single-clock version the input is sampled by one extra flip-flop
// to find its rising edge, and F1 is reloaded every clock instead of being
// reset asynchronously by F2; the pulse train it produces is the same.
// clr empties F1 and F2 and takes the present input level as the old
// one, so a level that is already high gives no pulse.
// Timing: b is high for the clock period that follows the second clock
// edge at which the input is high. Input edges must be at least two
// clocks apart.
module pulse_synchronizer (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic in_level,
  output logic b
);

  logic in_d;   // previous sample of the input
  logic f1;     // edge seen
  logic f2;     // synchronised output pulse

  assign b = f2;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      in_d <= in_level;
      f1   <= 1'b0;
      f2   <= 1'b0;
    end else begin
      in_d <= in_level;
      f1   <= in_level & ~in_d;
      f2   <= f1;
    end
  end

  // B is one clock wide: the add/subtract gating must see it only once.
  a_b_one_clock: assert property (@(posedge clk) disable iff (!rst_n) b |=> !b);

endmodule
