// tlc_dwell_timer: measures how long the controller has been in its current
// light state.
//
// The counter starts at 0 when the state is entered and advances by one on
// every rising clock edge. While count < limit the state holds (the self-loop
// "Count < N" of the state diagram); once count reaches limit, done rises and
// stays high until clear. The sequencer drives clear in the cycle it leaves
// the state, so the new state again starts from 0.
//
// Interface: clk, rst (active high, synchronous), clear (synchronous restart),
// limit (sampled every cycle). Outputs: count, done = (count >= limit), both
// straight from the register, so done is valid in the same cycle as count.
// A state with limit N therefore lasts N + 1 cycles (counts 0..N).
//
// The counter and its compare come from the state diagram; the synchronous
// reset, the hold at limit and the width parameter are this design's choices.
module tlc_dwell_timer #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic [WIDTH-1:0] limit,
  output logic [WIDTH-1:0] count,
  output logic             done
);

  assign done = (count >= limit);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      count <= '0;
    end else if (!done) begin
      count <= count + 1'b1;
    end
  end

endmodule
