// tb_traffic_light: end-to-end test of the traffic light controller at its
// default dwell limits (15 and 3), with no parameter overrides.
//
// After reset it watches the lamp vector for several full rounds and checks:
// the order of the six stages against the stage table written out as literals
// (001100, 010100, 100100, 100001, 100010, 100100); that a green stage lasts
// 16 cycles and every other stage 4 (stay while count < limit, counts 0..N);
// that a full round takes 48 cycles; that the two highways are never both
// off red; and that ns_ryg / ew_ryg / stage agree with the 6-bit vector. It
// then resets in the middle of stages and checks the restart. Each mechanism
// (long dwell, short dwell, all-red clearance, wrap from the last stage to
// the first, reset in mid-stage) is counted and must occur at least once.
module tb_traffic_light;
  import tlc_pkg::*;

  logic       clk;
  logic       rst;
  logic [5:0] signal;
  ryg_t       ns_ryg;
  ryg_t       ew_ryg;
  logic [2:0] stage;
  logic [3:0] dwell_count;

  int checks   = 0;
  int failures = 0;

  traffic_light dut (
    .clk        (clk),
    .rst        (rst),
    .signal     (signal),
    .ns_ryg     (ns_ryg),
    .ew_ryg     (ew_ryg),
    .stage      (stage),
    .dwell_count(dwell_count)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] exp_signal [6] = '{6'b001100, 6'b010100, 6'b100100,
                                 6'b100001, 6'b100010, 6'b100100};
  int         exp_cycles [6] = '{16, 4, 4, 16, 4, 4};

  int n_long_dwell  = 0;
  int n_short_dwell = 0;
  int n_all_red     = 0;
  int n_wrap        = 0;
  int n_mid_reset   = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Every cycle: no conflicting greens/yellows, split outputs consistent.
  always @(negedge clk) begin
    if (!rst) begin
      check("one highway red", int'(signal[5:3] == 3'b100 || signal[2:0] == 3'b100), 1);
      check("ns_ryg matches signal", int'(ns_ryg), int'(signal[5:3]));
      check("ew_ryg matches signal", int'(ew_ryg), int'(signal[2:0]));
    end
  end

  // Runs the controller for `rounds` full rounds, starting just after stage 0
  // has been entered, and checks every stage's pattern and duration.
  task automatic run_rounds(input int rounds);
    int t_round_start;
    int t_cycle;
    t_cycle = 0;
    t_round_start = 0;
    for (int r = 0; r < rounds; r++) begin
      for (int i = 0; i < 6; i++) begin
        int len;
        len = 0;
        check($sformatf("stage number round %0d stage %0d", r, i), int'(stage), i);
        check($sformatf("signal round %0d stage %0d", r, i), int'(signal), int'(exp_signal[i]));
        if (signal == 6'b100100) n_all_red++;
        while (int'(stage) == i && len < 100) begin
          check("pattern stable in stage", int'(signal), int'(exp_signal[i]));
          check("dwell count", int'(dwell_count), len);
          @(posedge clk); #1;
          len++;
          t_cycle++;
        end
        check($sformatf("cycles in stage %0d", i), len, exp_cycles[i]);
        if (len == exp_cycles[i]) begin
          if (exp_cycles[i] == 16) n_long_dwell++;
          else n_short_dwell++;
        end
        if (i == 5 && int'(stage) == 0) n_wrap++;
      end
      check($sformatf("round %0d length", r), t_cycle - t_round_start, 48);
      t_round_start = t_cycle;
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check("reset stage", int'(stage), 0);
    check("reset signal", int'(signal), int'(6'b001100));
    check("reset count", int'(dwell_count), 0);
    rst = 1'b0;

    run_rounds(4);

    // Reset in the middle of each stage: the controller restarts at stage 0
    // with a full-length first stage.
    for (int target = 0; target < 6; target++) begin
      while (int'(stage) != target) begin @(posedge clk); #1; end
      repeat (2) begin @(posedge clk); #1; end
      rst = 1'b1;
      @(posedge clk); #1;
      rst = 1'b0;
      check("stage after mid-stage reset", int'(stage), 0);
      check("count after mid-stage reset", int'(dwell_count), 0);
      if (int'(stage) == 0 && dwell_count == 0) n_mid_reset++;
      run_rounds(1);
    end

    check("long dwell seen",        int'(n_long_dwell  > 0), 1);
    check("short dwell seen",       int'(n_short_dwell > 0), 1);
    check("all-red clearance seen", int'(n_all_red     > 0), 1);
    check("wrap to first stage seen", int'(n_wrap      > 0), 1);
    check("mid-stage reset seen",   int'(n_mid_reset   > 0), 1);
    $display("mechanisms: long_dwell=%0d short_dwell=%0d all_red=%0d wrap=%0d mid_reset=%0d",
             n_long_dwell, n_short_dwell, n_all_red, n_wrap, n_mid_reset);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
