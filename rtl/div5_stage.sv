// div5_stage: one presettable divide-by-five stage of the main counter.
//
// The state runs 0,1,2,3,4,0,... advancing in each clock where cin is
// high. cout is high when the stage wraps from 4 to 0, and enables the
// next stage in the same clock, so a chain of these stages behaves as one
// synchronous counter. On load the state is set to preset (a digit 0..4
// of the phase word); load has priority. A preset outside 0..4 is not
// produced by a correct phase word; such a state goes to 0 at the next
// count (this design's choice).
module div5_stage (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [2:0] preset,
  input  logic       cin,
  output logic [2:0] q,
  output logic       cout
);

  logic top;   // at (or beyond) the last state

  assign top  = (q >= 3'd4);
  assign cout = ~load & cin & top;

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= preset;
    else if (cin)  q <= top ? 3'd0 : q + 3'd1;
  end

  // A stage that has counted at least once is never outside 0..4.
  a_state_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  (!load && cin) |=> (q <= 3'd4));

endmodule
