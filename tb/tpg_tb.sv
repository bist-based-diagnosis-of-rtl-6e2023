// tpg_tb: self-checking testbench for the counter-based TPG.
// Checks the exhaustive sequence (pattern k in cycle k after start), the
// complemented aggressor value, Done exactly 2^WIDTH cycles after start,
// holding while paused, and roll-over with its wrap pulse.
module tpg_tb;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned N_AGG = 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, pause = 1'b0, roll = 1'b0;
  logic [WIDTH-1:0] pattern;
  logic [N_AGG-1:0] agg;
  logic active, done, wrap;
  int checks = 0, failures = 0;

  tpg #(.WIDTH(WIDTH), .N_AGG(N_AGG)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    int wraps;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!active && !done && pattern == 0, "reset state");

    // Full sequence.
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    for (int k = 0; k < (1 << WIDTH); k++) begin
      check(pattern == WIDTH'(k), $sformatf("pattern %0d", k));
      check(agg == {N_AGG{~pattern[WIDTH-1]}}, "aggressors opposite");
      check(active && !done, "active during sequence");
      if (k == 0) check(agg == '1, "aggressors 1 while WUTs all 0");
      if (k == (1 << WIDTH) - 1) check(agg == '0, "aggressors 0 while WUTs all 1");
      if (!done) begin
        @(negedge clk);
        cycles++;
      end
    end
    check(done && !active, "done after last pattern");
    check(cycles == (1 << WIDTH) + 1, $sformatf("done %0d edges after start (want %0d)", cycles - 1, 1 << WIDTH));
    repeat (3) @(negedge clk);
    check(done && pattern == '1, "done held, pattern held");

    // Pause.
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (5) @(negedge clk);
    check(pattern == 5, "pattern before pause");
    pause = 1'b1;
    repeat (7) @(negedge clk);
    check(pattern == 5 && active, "pattern held while paused");
    pause = 1'b0;
    @(negedge clk);
    check(pattern == 6, "counting resumes");

    // Roll-over.
    roll = 1'b1;
    wraps = 0;
    for (int k = 0; k < 3 * (1 << WIDTH); k++) begin
      @(negedge clk);
      if (wrap) begin
        wraps++;
        check(pattern == 0, "wrap to pattern 0");
      end
      check(!done && active, "no done while rolling");
    end
    check(wraps == 3, $sformatf("three roll-overs, saw %0d", wraps));
    roll = 1'b0;
    while (!done) @(negedge clk);
    check(pattern == '1, "ends on last pattern after roll is released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
