// rate_multiplier: binary rate multiplier (the variable-frequency pulse
// generator of the fringe synthesizer).
//
// An N-stage binary divider chain advances once per ce (f0 = 12.5 MHz in
// the full system). On every advance exactly one stage goes from 0 to 1
// (the lowest stage that was 0), so the events "stage m rises" form N
// pulse trains at f0/2, f0/4 .. f0/2^N that never coincide. Each train is
// gated by one bit of the rate setting M, the MSB gating f0/2, and the
// gated trains are ORed. Over 2^N advances exactly M pulses come out, so
// the mean output rate is M*f0/2^N, from 0 to f0*(1-2^-N) in steps of
// f0/2^N. The pulses are unevenly spaced; the divider that follows
// smooths them.
//
// The text builds this from three 6-stage TTL rate multiplier packages;
// here the chain is one N-bit counter with the same pulse trains. Clearing
// the chain when a new rate is loaded is this design's choice.
// Interface: rate_in is latched on load (which also clears the chain).
// pulse is high for one clock, in a clock where ce is high, and is a
// combinational function of the chain state and the latched rate.
module rate_multiplier #(
  parameter int unsigned N = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         load,
  input  logic [N-1:0] rate_in,
  output logic         pulse
);

  logic [N-1:0] chain;      // divider chain state
  logic [N-1:0] rate;       // latched rate setting
  logic [N-1:0] rising;     // one-hot: stage that goes 0 -> 1 next
  logic [N-1:0] rate_rev;   // rate bits in train order (bit m gates f0/2^(m+1))

  always_comb begin
    rising = ~chain & (chain + N'(1));
    for (int m = 0; m < N; m++) rate_rev[m] = rate[N-1-m];
  end

  assign pulse = ce & |(rising & rate_rev);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chain <= '0;
      rate  <= '0;
    end else if (load) begin
      chain <= '0;
      rate  <= rate_in;
    end else if (ce) begin
      chain <= chain + N'(1);
    end
  end

endmodule
