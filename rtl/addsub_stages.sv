// addsub_stages: the first two stages (F1, F2) of the divide-by-500
// counter together with the add/subtract gating.
//
// Normally the pair counts up by one on each 50 MHz clock, F2 toggling
// when F1 is 1. When the synchronised rate pulse b is high, F1 is held;
// F2 then toggles if the sign-of-rate bit is 1 (the pair advances by two:
// one count added) and is held if it is 0 (the pair advances by zero: one
// count removed). This is the truth table of the text:
//   b=0, F1=1      : F1 counts, F2 counts
//   b=0, F1=0      : F1 counts, F2 holds
//   b=1, sign=1    : F1 holds,  F2 counts
//   b=1, sign=0    : F1 holds,  F2 holds
// carry is high in the clock at which F2 falls from 1 to 0; it advances
// the first divide-by-five stage, so the whole counter is synchronous.
// On load both stages are preset (to B10, B11 of the phase word) and the
// sign bit is latched; load has priority over counting.
module addsub_stages (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [1:0] preset,   // {F2, F1}
  input  logic       sign_in,
  input  logic       b,
  output logic [1:0] q,        // {F2, F1}
  output logic       carry
);

  logic sign;
  logic f1_count, f2_count;

  always_comb begin
    f1_count = ~b;
    f2_count = b ? sign : q[0];
  end

  assign carry = ~load & f2_count & q[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q    <= '0;
      sign <= 1'b0;
    end else if (load) begin
      q    <= preset;
      sign <= sign_in;
    end else begin
      if (f1_count) q[0] <= ~q[0];
      if (f2_count) q[1] <= ~q[1];
    end
  end

endmodule
