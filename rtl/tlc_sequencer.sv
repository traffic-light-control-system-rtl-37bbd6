// tlc_sequencer: the six-state light sequence of the traffic controller.
//
// A Moore machine steps S0 -> S1 -> S2 -> S3 -> S4 -> S5 -> S0. S0 gives the
// north-south highway green while east-west sees red; S1 turns north-south
// yellow; S2 holds both red; S3..S5 repeat this for east-west. Each state
// picks its dwell limit (LONG_DELAY for the two green states, SHORT_DELAY for
// the yellow and all-red states) and waits for the dwell timer's done. On
// done it raises advance for one cycle, which moves to the next state on the
// same edge that clears the timer.
//
// Interface: clk, rst (active high, synchronous, returns to S0), done from
// the timer. Outputs: state, limit and advance to the timer, and the lamp
// vector lights = {NS RYG, EW RYG}, decoded from the state register alone.
//
// advance is the done input passed on unchanged: the sequencer has no reason
// to refuse a step, and the top uses advance, not done, to clear the timer so
// that the one signal both moves the state and restarts the count.
//
// The states, their order, their lamp patterns and the limits 15 and 3
// follow the design's stage table and state diagram. Which highway gets
// green first, the binary state encoding and the synchronous reset are this
// implementation's choices.
module tlc_sequencer
  import tlc_pkg::*;
#(
  parameter int unsigned WIDTH       = 4,
  parameter int unsigned LONG_DELAY  = LONG_DELAY_DEFAULT,
  parameter int unsigned SHORT_DELAY = SHORT_DELAY_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             done,
  output state_t           state,
  output logic [WIDTH-1:0] limit,
  output logic             advance,
  output lights_t          lights
);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S0;
    end else if (advance) begin
      state <= next_state(state);
    end
  end

  always_comb begin
    advance = done;
    limit   = is_long(state) ? WIDTH'(LONG_DELAY) : WIDTH'(SHORT_DELAY);
    lights  = lights_of(state);
  end

  // At most one highway may be shown anything other than red.
  ap_no_conflict: assert property (@(posedge clk) disable iff (rst)
    lights.ns == RYG_RED || lights.ew == RYG_RED);

  // Each head lights exactly one lamp.
  ap_one_lamp: assert property (@(posedge clk) disable iff (rst)
    $onehot(lights.ns) && $onehot(lights.ew));

  // The state register never holds an unused code.
  ap_legal_state: assert property (@(posedge clk) disable iff (rst)
    state inside {S0, S1, S2, S3, S4, S5});

endmodule
