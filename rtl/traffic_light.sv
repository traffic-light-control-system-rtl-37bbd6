// traffic_light: traffic light controller for a crossing of a north-south
// and an east-west highway.
//
// The controller cycles through six stages: north-south green (long), north-
// south yellow (short), all red (short), east-west green (long), east-west
// yellow (short), all red (short), then starts over. A sequencer holds the
// stage; a dwell timer counts the cycles spent in it and tells the sequencer
// when to move on.
//
// Interface: clk, rst (active high, synchronous; restarts at north-south
// green with the timer at 0). Outputs: signal, the 6-bit lamp vector
// {RYG(NS), RYG(EW)} (bit 5 north-south red ... bit 0 east-west green), the
// same lamps as ns_ryg / ew_ryg, the current stage number (0..5 for
// S0..S5) and the dwell timer's count.
//
// Timing: a stage with dwell limit N lasts N + 1 clock cycles, so at the
// defaults (15 and 3) a green stage lasts 16 cycles, every other stage 4,
// and one full cycle of six stages takes 48 clock cycles. The first stage
// after reset lasts the full 16.
//
// The stage order, lamp patterns and the limits 15 and 3 follow the design's
// stage table and state diagram; the port list, the extra ns_ryg / ew_ryg /
// stage / dwell_count outputs and the timer width derived from LONG_DELAY are this
// implementation's choices.
module traffic_light
  import tlc_pkg::*;
#(
  parameter int unsigned LONG_DELAY  = LONG_DELAY_DEFAULT,
  parameter int unsigned SHORT_DELAY = SHORT_DELAY_DEFAULT,
  localparam int unsigned MAX_DELAY =
    (LONG_DELAY > SHORT_DELAY) ? LONG_DELAY : SHORT_DELAY,
  localparam int unsigned WIDTH = (MAX_DELAY < 2) ? 1 : $clog2(MAX_DELAY + 1)
) (
  input  logic       clk,
  input  logic       rst,
  output logic [5:0] signal,
  output ryg_t       ns_ryg,
  output ryg_t       ew_ryg,
  output logic [2:0] stage,
  output logic [WIDTH-1:0] dwell_count
);

  state_t           state;
  lights_t          lights;
  logic [WIDTH-1:0] limit;
  logic             done;
  logic             advance;

  tlc_sequencer #(
    .WIDTH      (WIDTH),
    .LONG_DELAY (LONG_DELAY),
    .SHORT_DELAY(SHORT_DELAY)
  ) u_sequencer (
    .clk    (clk),
    .rst    (rst),
    .done   (done),
    .state  (state),
    .limit  (limit),
    .advance(advance),
    .lights (lights)
  );

  tlc_dwell_timer #(
    .WIDTH(WIDTH)
  ) u_timer (
    .clk  (clk),
    .rst  (rst),
    .clear(advance),
    .limit(limit),
    .count(dwell_count),
    .done (done)
  );

  assign signal = lights;
  assign ns_ryg = lights.ns;
  assign ew_ryg = lights.ew;
  assign stage  = state;

endmodule
