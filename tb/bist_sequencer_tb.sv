// bist_sequencer_tb: self-checking testbench for the test-phase sequencer.
// A small TPG and a CHAIN_LEN-bit scan chain are modelled here.  Checks:
// the fault-detection phase length (2 + 2^TPG_W + CHAIN_LEN cycles from go
// to phase_done), the clear/start pulse, shift operation exactly during the
// read-out, the read-out order; in scan ORA phases, that the last capture
// edge sees the target pattern, pausing of the TPG during the read-out, and
// a continued phase that needs the TPG to roll over.
module bist_sequencer_tb;
  localparam int unsigned TPG_W = 4, CHAIN_LEN = 10;
  localparam int unsigned IDX_W = $clog2(CHAIN_LEN + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic go = 1'b0, cont = 1'b0, scan_ora = 1'b0, hold_tpg = 1'b0;
  logic [TPG_W-1:0] target = '0;
  logic tpg_done, chain_out;
  logic [TPG_W-1:0] tpg_pattern;
  logic tpg_start, tpg_pause, tpg_roll, ora_clr, scan_mode, res_bit, res_valid, busy, phase_done;
  logic [IDX_W-1:0] res_idx;

  int checks = 0, failures = 0;

  bist_sequencer #(.TPG_W(TPG_W), .CHAIN_LEN(CHAIN_LEN)) dut (.*);

  always #5 clk = ~clk;

  // TPG model.
  logic [TPG_W-1:0] cnt;
  logic act, dn;
  int wraps;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; act <= 1'b0; dn <= 1'b0; wraps <= 0;
    end else if (tpg_start) begin
      cnt <= '0; act <= 1'b1; dn <= 1'b0;
    end else if (act && !tpg_pause) begin
      if (cnt != '1) cnt <= cnt + 1'b1;
      else if (tpg_roll) begin
        cnt <= '0;
        wraps <= wraps + 1;
      end else begin
        act <= 1'b0; dn <= 1'b1;
      end
    end
  end
  assign tpg_pattern = cnt;
  assign tpg_done    = dn;

  // Scan chain model: loads parallel data on ora_clr, shifts when scan_mode is 0.
  logic [CHAIN_LEN-1:0] chain, load_val;
  logic [TPG_W-1:0] last_capture;
  always_ff @(posedge clk) begin
    if (ora_clr) chain <= load_val;
    else if (!scan_mode) chain <= {1'b0, chain[CHAIN_LEN-1:1]};
    if (scan_mode) last_capture <= cnt;
  end
  assign chain_out = chain[0];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run one phase; cycles - 1 is the number of clock edges from the one that
  // samples go to the one that raises phase_done.
  task automatic run(input bit scan, input bit c, input bit hold, input logic [TPG_W-1:0] tgt,
                     output logic [CHAIN_LEN-1:0] bits, output int cycles);
    int starts = 0, n = 0;
    logic [TPG_W-1:0] pat_at_shift;
    bit first = 1;
    scan_ora = scan; cont = c; hold_tpg = hold; target = tgt;
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    cycles = 1;
    bits = '0;
    while (!phase_done) begin
      if (tpg_start) begin
        starts++;
        check(ora_clr, "clear with start");
      end
      check(scan_mode == !res_valid, "shift operation exactly during read-out");
      if (res_valid) begin
        check(int'(res_idx) == n, "read-out index");
        bits[n] = res_bit;
        n++;
        if (first) begin
          pat_at_shift = cnt;
          first = 0;
        end
        if (scan && hold) check(cnt == pat_at_shift && tpg_pause, "TPG paused during read-out");
      end
      @(negedge clk);
      cycles++;
      if (cycles > 5000) break;
    end
    check(n == CHAIN_LEN, "read-out length");
    check(starts == (c ? 0 : 1), "one start pulse unless continuing");
    if (scan) check(last_capture == tgt, $sformatf("captured pattern %0d want %0d", last_capture, tgt));
    @(negedge clk);
    check(!busy, "idle after phase");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CHAIN_LEN-1:0] bits;
    int cycles, w0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Fault detection phases.
    for (int t = 0; t < 4; t++) begin
      load_val = CHAIN_LEN'($urandom);
      run(0, 0, 0, '0, bits, cycles);
      check(bits == load_val, $sformatf("read-out %b want %b", bits, load_val));
      check(cycles - 1 == 2 + (1 << TPG_W) + CHAIN_LEN, $sformatf("phase took %0d cycles", cycles));
      check(tpg_done, "TPG finished");
    end
    // Scan ORA capture with the TPG paused during the read-out.
    load_val = '0;
    run(1, 0, 1, 4'd9, bits, cycles);
    // Continue to a later pattern, TPG free-running.
    run(1, 1, 0, 4'd14, bits, cycles);
    // Continue to an earlier pattern: needs a roll-over.
    w0 = wraps;
    run(1, 1, 0, 4'd3, bits, cycles);
    check(wraps > w0, "TPG rolled over to reach an earlier pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
