// galaxy_bist_tb: end-to-end test of the galaxy BIST at its default size
// (10 STARs, 2 x 8 WUTs of 20 segments each, 4 ORA taps per STAR, plus the
// MUX CIP ORA: a 321-bit ORA scan chain).  It takes the design through
// the mechanisms it has:
//   - fault-free detection phase, with its length checked;
//   - a wire shorted to power in one STAR: only that STAR's far ORAs fail;
//   - the flipped configuration of the same phase: the near ORAs fail;
//   - two faults in two STARs (a stuck-at and a wired-AND short);
//   - scan ORA capture of a walking-1 and a walking-0 pattern, TPG paused,
//     that shows which two wires are shorted;
//   - a continued capture of an earlier pattern, reached by roll-over;
//   - progressive net deletion: CIPs of the dominant net are turned off one
//     by one from the far end until the ORA passes, locating the segment;
//   - six stuck-open CIPs in one STAR;
//   - two-testing: equivalent faults unmasked, a faulty group B named;
//   - divide-and-conquer: splitting the tiles separates two faults;
//   - the MUX CIP test with a stuck-closed and a stuck-open gate.
// Expected ORA bits are worked out from the fault position and the tap
// positions (segments 19, 13, 7 and 0); every mechanism is counted.
module galaxy_bist_tb;
  import bist_pkg::*;
  localparam int unsigned N_STAR = 10, W = 8, SEGS = 20, NF = 6, N_TAP = 4;
  localparam int unsigned MUX_IN = 4;
  localparam int unsigned TILE_BITS = N_TAP * W, MUX_BIT = N_STAR * TILE_BITS, CHAIN_LEN = MUX_BIT + 1;
  localparam int unsigned IDX_W = $clog2(CHAIN_LEN + 1);
  localparam int TAP_SEG[N_TAP] = '{19, 13, 7, 0};

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0, cont = 1'b0, scan_ora = 1'b0, hold_tpg = 1'b0, flip = 1'b0;
  logic two_test = 1'b0, split_en = 1'b0;
  logic [SEG_IDX_W-1:0] split_at = '0;
  logic [W-1:0] target = '0;
  ora_cfg_e ora_cfg = ORA_COMPARE;
  logic [N_STAR-1:0][2*W-1:0][SEGS:0] cip_on = '1;
  fault_t [N_STAR-1:0][NF-1:0] faults = {(N_STAR * NF){NO_FAULT}};
  logic [MUX_IN-1:0] mux_cfg = 4'b0100;
  logic [1:0][MUX_IN-1:0] mux_stuck_open = '0, mux_stuck_closed = '0;
  logic res_bit, res_valid, busy, phase_done, fail_any, tpg_wrap, mux_fail;
  logic [IDX_W-1:0] res_idx;
  logic [N_STAR-1:0] star_fail;
  logic [W-1:0] tpg_pattern;

  int checks = 0, failures = 0;
  int n_split = 0, n_two = 0, n_mux = 0, n_multi = 0, n_detect = 0, n_flip = 0, n_isolate = 0, n_capture = 0, n_pause = 0, n_roll = 0, n_delete = 0;

  galaxy_bist dut (.*);

  always #5 clk = ~clk;

  int wraps = 0;
  always @(posedge clk) if (tpg_wrap) wraps++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int bit_of(int s, int t, int i);
    return s * TILE_BITS + t * W + i;
  endfunction

  // Run a phase and return the read-out and its length in clock edges.
  task automatic run(input bit scan, input bit c, input bit hold, input logic [W-1:0] tgt,
                     output logic [CHAIN_LEN-1:0] bits, output int edges);
    logic [W-1:0] p0;
    bit first = 1, held = 1;
    scan_ora = scan; cont = c; hold_tpg = hold; target = tgt;
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    edges = 0;
    bits = '0;
    while (!phase_done) begin
      if (res_valid) begin
        bits[res_idx] = res_bit;
        if (first) p0 = tpg_pattern;
        else if (tpg_pattern != p0) held = 0;
        first = 0;
      end
      @(negedge clk);
      edges++;
    end
    if (scan && hold) begin
      check(held, "TPG paused during read-out");
      if (held) n_pause++;
    end
    @(negedge clk);
  endtask

  // Expected compare result for single stuck-at faults on group A wires.
  function automatic logic [CHAIN_LEN-1:0] exp_stuck(int s, int w, int k, bit flp);
    logic [CHAIN_LEN-1:0] e = '0;
    for (int t = 0; t < N_TAP; t++)
      if (flp ? (TAP_SEG[t] <= k) : (TAP_SEG[t] >= k)) e[bit_of(s, t, w)] = 1'b1;
    return e;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CHAIN_LEN-1:0] bits, e;
    int edges, found;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. Fault-free detection phase.
    run(0, 0, 0, '0, bits, edges);
    check(bits == '0 && star_fail == '0 && !fail_any, "fault-free phase passes");
    check(edges == 2 + (1 << W) + CHAIN_LEN, $sformatf("phase length %0d edges, want %0d", edges, 2 + (1 << W) + CHAIN_LEN));
    n_detect++;

    // 2. Group A wire 2 of STAR 3 shorted to power in segment 9.
    faults[3][0] = '{kind: F_STUCK1, wire_a: 8'd2, seg_a: 8'd9, wire_b: 8'd0};
    run(0, 0, 0, '0, bits, edges);
    e = exp_stuck(3, 2, 9, 0);
    check(bits == e, "stuck-at-1: far ORAs of STAR 3 fail");
    check(star_fail == 10'b00_0000_1000 && fail_any, $sformatf("only STAR 3 fails (%b)", star_fail));
    if (bits == e) n_detect++;

    // 3. Same phase flipped.
    flip = 1'b1;
    run(0, 0, 0, '0, bits, edges);
    e = exp_stuck(3, 2, 9, 1);
    check(bits == e, "flipped: near ORAs of STAR 3 fail");
    if (bits == e) n_flip++;
    flip = 1'b0;
    faults[3][0] = NO_FAULT;

    // 4. Two faults in two STARs: group A wire 5 of STAR 0 stuck at 1 in
    //    segment 0, group B wires 1 and 2 (wires 9, 10) of STAR 2 wired-AND
    //    shorted in segment 6.
    faults[0][0] = '{kind: F_STUCK1, wire_a: 8'd5, seg_a: 8'd0, wire_b: 8'd0};
    faults[2][0] = '{kind: F_SHORT_AND, wire_a: 8'd9, seg_a: 8'd6, wire_b: 8'd10};
    run(0, 0, 0, '0, bits, edges);
    e = exp_stuck(0, 5, 0, 0);
    for (int t = 0; t < 3; t++) begin
      e[bit_of(2, t, 1)] = 1'b1;
      e[bit_of(2, t, 2)] = 1'b1;
    end
    check(bits == e, "two faults in two STARs");
    check(star_fail == 10'b00_0000_0101, $sformatf("STARs 0 and 2 fail (%b)", star_fail));
    if (bits == e && star_fail == 10'b00_0000_0101) n_isolate++;
    faults[0][0] = NO_FAULT;
    faults[2][0] = NO_FAULT;

    // 5. Scan ORAs: group A wire 1 of STAR 4 shorted in segment 4 to wire 2,
    //    which dominates.  Walking 1 on wire 1 reads 0 beyond the short;
    //    walking 0 on wire 2 pulls wire 1 to 0 as well.
    faults[4][0] = '{kind: F_SHORT_DOM, wire_a: 8'd1, seg_a: 8'd4, wire_b: 8'd2};
    ora_cfg = ORA_CAPTURE_A;
    begin
      automatic logic [W-1:0] pats[2] = '{8'b0000_0010, 8'b1111_1011};
      automatic logic [W-1:0] bad[2]  = '{8'b0000_0000, 8'b1111_1001};
      for (int p = 0; p < 2; p++) begin
        run(1, 0, 1, pats[p], bits, edges);
        e = '0;
        for (int s = 0; s < N_STAR; s++)
          for (int t = 0; t < N_TAP; t++)
            e[bit_of(s, t, 0) +: W] = (s == 4 && TAP_SEG[t] >= 4) ? bad[p] : pats[p];
        check(bits == e, $sformatf("scan ORA capture of %b", pats[p]));
        if (bits == e) n_capture++;
      end
      // 6. Continue to an earlier pattern (all 1s is past; all 0s needs a roll-over).
      found = wraps;
      run(1, 1, 0, 8'h00, bits, edges);
      e = '0;
      check(bits == e, "continued capture of all 0s");
      check(wraps > found, "TPG rolled over to reach pattern 0");
      if (wraps > found && bits == e) n_roll++;
    end
    ora_cfg = ORA_COMPARE;
    faults[4][0] = NO_FAULT;

    // 7. Progressive net deletion in STAR 7: wire 0 shorted in segment 12
    //    to wire 1, which dominates.  Turn off CIPs of wire 1 from the far
    //    end until pair 0 of the far ORA passes.
    faults[7][0] = '{kind: F_SHORT_DOM, wire_a: 8'd0, seg_a: 8'd12, wire_b: 8'd1};
    found = -1;
    for (int c = SEGS - 1; c >= 0; c--) begin
      cip_on[7][1][c] = 1'b0;
      run(0, 0, 0, '0, bits, edges);
      if (!bits[bit_of(7, 0, 0)]) begin
        found = c;
        break;
      end
    end
    check(found == 12, $sformatf("deletion located segment %0d, want 12", found));
    if (found == 12) n_delete++;
    cip_on = '1;
    faults[7][0] = NO_FAULT;

    // 8. Six CIP stuck-open faults in one STAR (the largest count of the
    //    fault-injection experiments), on group A wires 0..5 of STAR 9 at
    //    CIPs 1, 4, 8, 10, 14 and 19.
    begin
      automatic int cips[6] = '{1, 4, 8, 10, 14, 19};
      e = '0;
      for (int f = 0; f < 6; f++) begin
        faults[9][f] = '{kind: F_CIP_OPEN, wire_a: 8'(f), seg_a: 8'(cips[f]), wire_b: 8'd0};
        for (int t = 0; t < N_TAP; t++)
          if (TAP_SEG[t] >= cips[f]) e[bit_of(9, t, f)] = 1'b1;
      end
      run(0, 0, 0, '0, bits, edges);
      check(bits == e, "six stuck-open CIPs in one STAR");
      check(star_fail == 10'b10_0000_0000, $sformatf("only STAR 9 fails (%b)", star_fail));
      if (bits == e) n_multi++;
      faults[9] = {NF{NO_FAULT}};
    end

    // 9. Two-testing.  Equivalent faults (group A and group B wire 3 of
    //    STAR 5 stuck at 0 in segment 2) escape the normal comparison but
    //    fail when each group is compared with a neighbour's group.  A
    //    fault in group B of STAR 6 alone moves from STAR 6's ORAs to STAR
    //    5's when two-testing, which names the faulty group.
    faults[5][0] = '{kind: F_STUCK0, wire_a: 8'd3,  seg_a: 8'd2, wire_b: 8'd0};
    faults[5][1] = '{kind: F_STUCK0, wire_a: 8'd11, seg_a: 8'd2, wire_b: 8'd0};
    run(0, 0, 0, '0, bits, edges);
    check(bits == '0, "equivalent faults masked without two-testing");
    two_test = 1'b1;
    run(0, 0, 0, '0, bits, edges);
    check(star_fail == 10'b00_0011_0000, $sformatf("two-testing: STARs 4 and 5 fail (%b)", star_fail));
    if (star_fail == 10'b00_0011_0000) n_two++;
    two_test = 1'b0;
    faults[5] = {NF{NO_FAULT}};
    faults[6][0] = '{kind: F_STUCK1, wire_a: 8'd12, seg_a: 8'd5, wire_b: 8'd0};
    run(0, 0, 0, '0, bits, edges);
    check(star_fail == 10'b00_0100_0000, $sformatf("group B fault in STAR 6 (%b)", star_fail));
    two_test = 1'b1;
    run(0, 0, 0, '0, bits, edges);
    check(star_fail == 10'b00_0010_0000, $sformatf("two-testing moves it to STAR 5 (%b)", star_fail));
    if (star_fail == 10'b00_0010_0000) n_two++;
    two_test = 1'b0;
    faults[6] = {NF{NO_FAULT}};

    // 11. Divide-and-conquer: group A wire 4 of STAR 8 stuck at 0 in
    //     segment 2 and stuck at 1 in segment 15.  Whole WUTs: the taps at
    //     segments 19, 13 and 7 fail.  Split at CIP 10: the tap at segment
    //     13 now passes, separating the two faults.
    faults[8][0] = '{kind: F_STUCK0, wire_a: 8'd4, seg_a: 8'd2,  wire_b: 8'd0};
    faults[8][1] = '{kind: F_STUCK1, wire_a: 8'd4, seg_a: 8'd15, wire_b: 8'd0};
    run(0, 0, 0, '0, bits, edges);
    e = '0;
    e[bit_of(8, 0, 4)] = 1'b1;
    e[bit_of(8, 1, 4)] = 1'b1;
    e[bit_of(8, 2, 4)] = 1'b1;
    check(bits == e, "two faults on one wire, whole tile");
    split_en = 1'b1;
    split_at = 8'd10;
    run(0, 0, 0, '0, bits, edges);
    e[bit_of(8, 1, 4)] = 1'b0;
    check(bits == e, "two faults on one wire, split tile");
    if (bits == e) n_split++;
    split_en = 1'b0;
    faults[8] = {NF{NO_FAULT}};

    // 10. MUX CIP test: input 2 selected; stuck-closed gate 0 on the first
    //     MUX CIP, then stuck-open selected gate on the second.
    for (int m = 0; m < 3; m++) begin
      mux_stuck_closed = '0;
      mux_stuck_open   = '0;
      if (m == 1) mux_stuck_closed[0] = 4'b0001;
      if (m == 2) mux_stuck_open[1]   = 4'b0100;
      run(0, 0, 0, '0, bits, edges);
      check(bits[MUX_BIT] == (m != 0) && mux_fail == (m != 0) && star_fail == '0,
            $sformatf("MUX CIP test case %0d: ORA bit %0b", m, bits[MUX_BIT]));
      if (m != 0 && mux_fail) n_mux++;
    end
    mux_stuck_open = '0;
    mux_stuck_closed = '0;

    // Every mechanism happened.
    check(n_multi > 0,   "mechanism: several faults in one STAR");
    check(n_two > 0,     "mechanism: two-testing");
    check(n_split > 0,   "mechanism: divide-and-conquer");
    check(n_mux > 0,     "mechanism: MUX CIP fault detection");
    check(n_detect > 0,  "mechanism: fault detection");
    check(n_flip > 0,    "mechanism: flipped configuration");
    check(n_isolate > 0, "mechanism: per-STAR isolation of several faults");
    check(n_capture > 0, "mechanism: scan ORA capture");
    check(n_pause > 0,   "mechanism: TPG pause");
    check(n_roll > 0,    "mechanism: TPG roll-over");
    check(n_delete > 0,  "mechanism: progressive net deletion");
    $display("mechanisms: split=%0d two-test=%0d mux=%0d multi=%0d", n_split, n_two, n_mux, n_multi);
    $display("mechanisms: detect=%0d flip=%0d isolate=%0d capture=%0d pause=%0d roll=%0d delete=%0d",
             n_detect, n_flip, n_isolate, n_capture, n_pause, n_roll, n_delete);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
