// phase_set_sync: aligns the fringe rotator reset with the 100 kHz
// reference.
//
// A one-clock set_req arms the block. The reference waveform is sampled
// by two flip-flops (it comes from another part of the oscillator system)
// and its rising edge detected; the first rising edge seen while armed
// produces a one-clock load pulse, which presets the divide-by-500
// counter to the phase number and applies the new rate and sign. Thus the
// output phase is set relative to the reference, as the text requires.
// A second request while armed is merged with the first.
//
// Timing: load is high in the clock after the sampled reference goes
// from 0 to 1, i.e. three clock edges after the reference edge. The
// two-stage sampling and request merging are this design's own choices.
module phase_set_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_100k,
  input  logic set_req,
  output logic load
);

  logic ref_s1, ref_s2, ref_s3;
  logic armed;
  logic ref_rise;

  assign ref_rise = ref_s2 & ~ref_s3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ref_s1 <= 1'b0;
      ref_s2 <= 1'b0;
      ref_s3 <= 1'b0;
      armed  <= 1'b0;
      load   <= 1'b0;
    end else begin
      ref_s1 <= ref_100k;
      ref_s2 <= ref_s1;
      ref_s3 <= ref_s2;
      load   <= (armed | set_req) & ref_rise;
      if (ref_rise)     armed <= 1'b0;
      else if (set_req) armed <= 1'b1;
    end
  end

  // The load pulse is one clock wide and only follows a reference rise.
  a_load_one_clock: assert property (@(posedge clk) disable iff (!rst_n) load |=> !load);
  a_load_on_ref:    assert property (@(posedge clk) disable iff (!rst_n) load |-> $past(ref_rise));

endmodule
