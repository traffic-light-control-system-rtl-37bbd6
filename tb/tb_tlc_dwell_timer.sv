// tb_tlc_dwell_timer: self-checking test of the dwell timer.
//
// Drives random limits (including 0 and the maximum) and random clear pulses
// and compares count and done every cycle with a reference counter kept in
// the testbench. It also measures, for a set of limits, that done first rises
// exactly limit cycles after a clear, which is the dwell the state diagram
// asks for ("stay while Count < limit").
module tb_tlc_dwell_timer;

  localparam int unsigned WIDTH = 4;

  logic             clk;
  logic             rst;
  logic             clear;
  logic [WIDTH-1:0] limit;
  logic [WIDTH-1:0] count;
  logic             done;

  int checks   = 0;
  int failures = 0;

  tlc_dwell_timer #(.WIDTH(WIDTH)) dut (
    .clk  (clk),
    .rst  (rst),
    .clear(clear),
    .limit(limit),
    .count(count),
    .done (done)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // Reference counter.
  int ref_count;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic step_and_check();
    @(posedge clk);
    if (rst || clear) ref_count = 0;
    else if (ref_count < int'(limit)) ref_count++;
    #1;
    check("count", int'(count), ref_count);
    check("done", int'(done), int'(ref_count >= int'(limit)));
  endtask

  initial begin
    rst   = 1'b1;
    clear = 1'b0;
    limit = 4'd3;
    ref_count = 0;
    repeat (2) step_and_check();
    rst = 1'b0;

    // Dwell length: done must rise exactly L cycles after the clear edge.
    for (int l = 0; l < 16; l++) begin
      int cycles;
      limit = WIDTH'(l);
      clear = 1'b1;
      step_and_check();
      clear = 1'b0;
      cycles = 0;
      while (!done && cycles < 40) begin
        step_and_check();
        cycles++;
      end
      check($sformatf("dwell cycles for limit %0d", l), cycles, l);
    end

    // Random limits, clears and resets.
    repeat (2000) begin
      clear = ($urandom_range(0, 9) == 0);
      rst   = ($urandom_range(0, 99) == 0);
      if ($urandom_range(0, 19) == 0) limit = WIDTH'($urandom_range(0, 15));
      step_and_check();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
