// tb_tlc_sequencer: self-checking test of the six-state sequencer.
//
// The dwell timer is replaced by a random done input. A reference model in
// the testbench tracks the expected stage and checks, every cycle, the lamp
// vector against the stage table written out as literals (001100, 010100,
// 100100, 100001, 100010, 100100), the dwell limit (15 for the two green
// stages, 3 otherwise) and the advance pulse. It also checks that synchronous
// reset returns to the first stage from every stage.
module tb_tlc_sequencer;
  import tlc_pkg::*;

  localparam int unsigned WIDTH = 4;

  logic             clk;
  logic             rst;
  logic             done;
  state_t           state;
  logic [WIDTH-1:0] limit;
  logic             advance;
  lights_t          lights;

  int checks   = 0;
  int failures = 0;

  tlc_sequencer #(.WIDTH(WIDTH), .LONG_DELAY(15), .SHORT_DELAY(3)) dut (
    .clk    (clk),
    .rst    (rst),
    .done   (done),
    .state  (state),
    .limit  (limit),
    .advance(advance),
    .lights (lights)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // Stage table, independent of the package: index = stage number.
  logic [5:0] exp_signal [6] = '{6'b001100, 6'b010100, 6'b100100,
                                 6'b100001, 6'b100010, 6'b100100};
  int         exp_limit  [6] = '{15, 3, 3, 15, 3, 3};

  int ref_stage;
  int visits [6];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic check_outputs();
    check("stage",   int'(state),        ref_stage);
    check("signal",  int'(6'(lights)),   int'(exp_signal[ref_stage]));
    check("limit",   int'(limit),        exp_limit[ref_stage]);
    check("advance", int'(advance),      int'(done));
  endtask

  task automatic step();
    @(posedge clk);
    if (rst) ref_stage = 0;
    else if (done) ref_stage = (ref_stage + 1) % 6;
    visits[ref_stage]++;
    #1;
    check_outputs();
  endtask

  initial begin
    rst  = 1'b1;
    done = 1'b0;
    ref_stage = 0;
    step();
    rst = 1'b0;

    // Walk the full sequence twice with one-cycle done pulses.
    for (int i = 0; i < 12; i++) begin
      done = 1'b0;
      step();
      done = 1'b1;
      #1 check_outputs();
      step();
    end
    done = 1'b0;
    step();
    check("back at stage 0 after two rounds", int'(state), 0);

    // Reset from every stage.
    for (int s = 0; s < 6; s++) begin
      rst = 1'b1; step(); rst = 1'b0;
      for (int k = 0; k < s; k++) begin done = 1'b1; step(); end
      done = 1'b0;
      step();
      check("reached stage before reset", int'(state), s);
      rst  = 1'b1;
      done = 1'b1;
      step();
      check("reset wins over done", int'(state), 0);
      rst  = 1'b0;
      done = 1'b0;
    end

    // Random done.
    repeat (3000) begin
      done = ($urandom_range(0, 2) == 0);
      rst  = ($urandom_range(0, 199) == 0);
      #1 check("advance follows done", int'(advance), int'(done));
      step();
    end

    for (int s = 0; s < 6; s++)
      check($sformatf("stage %0d visited", s), int'(visits[s] > 0), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
