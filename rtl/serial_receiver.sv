// serial_receiver: serial-to-parallel converter for the two 24-bit
// command words of one fringe rotator.
//
// Bits arrive most significant first. Each bit is presented on bit_in
// with a one-clock bit_valid strobe and shifted into a 24-bit register.
// A one-clock word_load strobe then copies the shift register into the
// holding register chosen by word_sel (0: word 1, sign and rate;
// 1: word 2, initial phase). The holding registers keep their value
// until the next word_load for them, so the synthesizer can keep running
// on the previous settings while new ones arrive; the settings take
// effect only when phase_set_sync issues its load pulse.
//
// The strobe-style interface and the one-bit word address are this
// design's own; the text fixes only the 24-bit word length and bit order.
// Timing: word1/word2 change on the clock edge that samples word_load.
// A bit_valid in the same clock as word_load is shifted in after the copy.
module serial_receiver
  import fringe_pkg::*;
#(
  parameter int unsigned WORD_W = WORD_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_valid,
  input  logic              bit_in,
  input  logic              word_load,
  input  logic              word_sel,
  output logic [WORD_W-1:0] word1,
  output logic [WORD_W-1:0] word2
);

  logic [WORD_W-1:0] shreg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg <= '0;
      word1 <= '0;
      word2 <= '0;
    end else begin
      if (word_load) begin
        if (word_sel) word2 <= shreg;
        else          word1 <= shreg;
      end
      if (bit_valid) shreg <= {shreg[WORD_W-2:0], bit_in};
    end
  end

endmodule
