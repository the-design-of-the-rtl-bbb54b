// phase_counter: the divide-by-500 counter of the fringe synthesizer.
//
// The 50 MHz clock is counted by addsub_stages (divide by four, with
// counts added or removed by the rate pulse b) followed by three
// div5_stage instances (4 x 5 x 5 x 5 = 500). Each removed count retards
// the 100 kHz output by 360/500 = 0.72 degrees and each added count
// advances it by the same, so with b pulses at rate fb the output is
// (50 MHz +/- fb)/500.
//
// The counter state read as a number is
//   n = 100*d100 + 20*d20 + 4*d4 + 2*F2 + F1,  0 <= n < 500,
// which is the phase-number rule of the command word, so loading the
// eleven phase bits presets the counter to n_p directly. wave is high
// while n < 250; it rises as the counter wraps to 0, so a counter preset
// to n_p at a reference rising edge gives a wave that leads the reference
// by n_p/500 of a cycle. Using n < 250 as the output waveform is this
// design's choice; wave is registered, one clock behind count.
module phase_counter
  import fringe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [10:0]       phase_bits,  // B1..B11, B1 in bit 10
  input  logic              sign_in,
  input  logic              b,
  output logic [8:0]        count,
  output logic              wave
);

  phase_bits_t pb;
  logic [1:0]  q01;
  logic [2:0]  d4, d20, d100;
  logic        c0, c1, c2, c3;

  assign pb = phase_bits;

  addsub_stages u_addsub (
    .clk, .rst_n, .load,
    .preset ({pb.b2, pb.b1}),
    .sign_in,
    .b,
    .q      (q01),
    .carry  (c0)
  );

  div5_stage u_div5_a (.clk, .rst_n, .load, .preset(pb.d4),   .cin(c0), .q(d4),   .cout(c1));
  div5_stage u_div5_b (.clk, .rst_n, .load, .preset(pb.d20),  .cin(c1), .q(d20),  .cout(c2));
  div5_stage u_div5_c (.clk, .rst_n, .load, .preset(pb.d100), .cin(c2), .q(d100), .cout(c3));

  assign count = phase_number('{d100: d100, d20: d20, d4: d4, b2: q01[1], b1: q01[0]});

  always_ff @(posedge clk) begin
    if (!rst_n) wave <= 1'b0;
    else        wave <= (count < 9'(N_DIV / 2));
  end

endmodule
