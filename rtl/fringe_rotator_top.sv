// fringe_rotator_top: one fringe rotator unit (fringe-frequency
// synthesizer with its command interface).
//
// The unit makes a 100 kHz waveform whose frequency is offset by up to
// +/-500 Hz and whose starting phase is set, in 0.72 degree steps,
// relative to a 100 kHz reference. Added to the local oscillator of one
// antenna it turns the fringe pattern so that the correlator output is
// at zero fringe frequency.
//
// Signal path, all on the 50 MHz clock:
//   pulse_divider /4      -> 12.5 MHz enable (f0)
//   rate_multiplier       -> M*f0/2^18 pulses per second (M = 18-bit rate)
//   pulse_divider /50     -> square wave at that rate / 50
//   pulse_synchronizer    -> one-clock pulse b per edge, at most 250 kHz
//   phase_counter (/500)  -> counts 50 MHz, plus one (sign 1) or minus
//                            one (sign 0) count per b; 100 kHz +/- M*500/2^18 Hz
//   output_stage          -> 0/180 degree phase switch and LED drive
// serial_receiver collects the two 24-bit command words. A set_req pulse
// arms phase_set_sync, which at the next rising edge of ref_100k loads
// the new rate (rate multiplier), sign (add/subtract stages) and initial
// phase n_p (main counter), and clears the /4, /50 and synchronizer.
//
// Timing: the counter is preset four clocks (80 ns, 2.9 degrees) after
// the reference edge and fringe_out follows the counter by one further
// clock; this fixed lag is the same in every unit. The 12.5 MHz rate
// multiplier clock, the clearing on load and the strobe interface are
// this design's own; the frequencies, divisions, word format, add/subtract
// rule and phase-number rule follow the text.
module fringe_rotator_top
  import fringe_pkg::*;
#(
  parameter int unsigned RM_BITS     = RATE_BITS,
  parameter int unsigned RM_PRESCALE = 4,
  parameter int unsigned SYNC_DIV    = 50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ref_100k,
  input  logic       ser_bit_valid,
  input  logic       ser_bit,
  input  logic       ser_word_load,
  input  logic       ser_word_sel,
  input  logic       set_req,
  input  logic       phase_switch,
  output logic       fringe_out,
  output logic       led_n,
  output logic [8:0] phase_count,
  output logic       load_pulse
);

  logic [WORD_BITS-1:0] w1_raw, w2_raw;
  word1_t               w1;
  word2_t               w2;
  logic                 load;
  logic                 f0_ce, f0_unused;
  logic                 rm_pulse;
  logic                 div_level, div_unused;
  logic                 b;
  logic                 wave;

  assign w1 = w1_raw;
  assign w2 = w2_raw;
  assign load_pulse = load;

  serial_receiver u_rx (
    .clk, .rst_n,
    .bit_valid (ser_bit_valid),
    .bit_in    (ser_bit),
    .word_load (ser_word_load),
    .word_sel  (ser_word_sel),
    .word1     (w1_raw),
    .word2     (w2_raw)
  );

  phase_set_sync u_sync_set (
    .clk, .rst_n, .ref_100k, .set_req, .load
  );

  pulse_divider #(.DIV(RM_PRESCALE)) u_prescale (
    .clk, .rst_n, .clr(load), .in_pulse(1'b1),
    .out_level(f0_unused), .out_pulse(f0_ce)
  );

  rate_multiplier #(.N(RM_BITS)) u_rm (
    .clk, .rst_n, .ce(f0_ce), .load,
    .rate_in (w1.rate[RATE_BITS-1 -: RM_BITS]),
    .pulse   (rm_pulse)
  );

  pulse_divider #(.DIV(SYNC_DIV)) u_div50 (
    .clk, .rst_n, .clr(load), .in_pulse(rm_pulse),
    .out_level(div_level), .out_pulse(div_unused)
  );

  pulse_synchronizer u_psync (
    .clk, .rst_n, .clr(load), .in_level(div_level), .b
  );

  phase_counter u_ctr (
    .clk, .rst_n, .load,
    .phase_bits (w2[WORD_BITS-1 -: PHASE_BITS]),
    .sign_in    (w1.sign),
    .b,
    .count      (phase_count),
    .wave
  );

  output_stage u_out (
    .wave, .phase_switch, .ref_100k, .fringe_out, .led_n
  );

endmodule
