// bist_tile_tb: self-checking testbench for one BIST structure (TPG, two WUT
// groups, ORAs at the far end and at the near end).  Runs fault-detection
// phases with no fault, a stuck-at, a stuck-open CIP and a short to an
// aggressor wire, each with the TPG at the normal and at the flipped end,
// and checks which ORA bits fail; checks comparison against an external
// group B (two-testing); then captures one pattern with scan ORAs
// and checks the observed wire values.  Also checks the 2^W-cycle sequence.
module bist_tile_tb;
  import bist_pkg::*;
  localparam int unsigned W = 4, SEGS = 6, N_AGG = 2, NF = 2, N_TAP = 2;
  localparam int unsigned NB = N_TAP * W;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, pause = 1'b0, roll = 1'b0, flip = 1'b0;
  logic [2*W-1:0][SEGS:0] cip_on = '1;
  fault_t [NF-1:0] faults = {NF{NO_FAULT}};
  logic ora_clr = 1'b0, scan_mode = 1'b1, scan_in = 1'b0, scan_out;
  logic use_ext_b = 1'b0, split_en = 1'b0;
  logic [SEG_IDX_W-1:0] split_at = '0;
  logic [NB-1:0] ext_b, tap_b_out;
  ora_cfg_e ora_cfg = ORA_COMPARE;
  logic [W-1:0] pattern;
  logic active, done, wrap;
  logic [NB-1:0] ora_q;
  int checks = 0, failures = 0;

  bist_tile #(.W(W), .SEGS(SEGS), .N_AGG(N_AGG), .NF(NF), .N_TAP(N_TAP)) dut (.*);

  always #5 clk = ~clk;

  // External group B for two-testing: a fault-free copy of the pattern at
  // every tap.
  assign ext_b = {N_TAP{pattern}};

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic shift_out(output logic [NB-1:0] r);
    scan_mode = 1'b0;
    for (int k = 0; k < NB; k++) begin
      r[k] = scan_out;
      @(negedge clk);
    end
    scan_mode = 1'b1;
  endtask

  // Fault-detection phase: returns the ORA bits (bit t*W+i = tap t, pair i).
  task automatic phase(input logic f, output logic [NB-1:0] r);
    int n = 0;
    flip = f;
    ora_cfg = ORA_COMPARE;
    ora_clr = 1'b1;
    start = 1'b1;
    @(negedge clk);
    ora_clr = 1'b0;
    start = 1'b0;
    while (!done) begin
      @(negedge clk);
      n++;
    end
    check(n == (1 << W), $sformatf("sequence of %0d cycles", n));
    shift_out(r);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    phase(0, r); check(r == '0, $sformatf("fault-free %b", r));
    phase(1, r); check(r == '0, $sformatf("fault-free flipped %b", r));

    // Group A wire 1 stuck at 1 in segment 3 (tap 0 = segment 5, tap 1 = segment 0).
    faults[0] = '{kind: F_STUCK1, wire_a: 8'd1, seg_a: 8'd3, wire_b: 8'd0};
    phase(0, r); check(r == 8'b0000_0010, $sformatf("stuck-at: far ORA fails %b", r));
    phase(1, r); check(r == 8'b0010_0000, $sformatf("stuck-at flipped: near ORA fails %b", r));

    // Group B wire 2 (wire 6): CIP 2 stuck-open.
    faults[0] = '{kind: F_CIP_OPEN, wire_a: 8'd6, seg_a: 8'd2, wire_b: 8'd0};
    phase(0, r); check(r == 8'b0000_0100, $sformatf("open CIP %b", r));
    phase(1, r); check(r == 8'b0100_0000, $sformatf("open CIP flipped %b", r));

    // Group A wire 0 shorted to aggressor 0 (wire 8) in segment 2, aggressor dominant.
    faults[0] = '{kind: F_SHORT_DOM, wire_a: 8'd8, seg_a: 8'd2, wire_b: 8'd8};
    faults[0].wire_a = 8'd0;
    phase(0, r); check(r == 8'b0000_0001, $sformatf("short to aggressor %b", r));

    // Equivalent faults in both groups are masked by comparison.
    faults[0] = '{kind: F_STUCK0, wire_a: 8'd3, seg_a: 8'd1, wire_b: 8'd0};
    faults[1] = '{kind: F_STUCK0, wire_a: 8'd7, seg_a: 8'd1, wire_b: 8'd0};
    phase(0, r); check(r == '0, $sformatf("equivalent faults masked %b", r));
    faults[1] = NO_FAULT;

    // Two-testing: group B wire 2 stuck at 1 fails against the own group A,
    // passes when group A is compared with a fault-free external group; a
    // group A fault fails in both.
    faults[0] = '{kind: F_STUCK1, wire_a: 8'd6, seg_a: 8'd0, wire_b: 8'd0};
    phase(0, r); check(r == 8'b0100_0100, $sformatf("group B fault, own group %b", r));
    use_ext_b = 1'b1;
    phase(0, r); check(r == '0, $sformatf("group B fault, external group %b", r));
    check(tap_b_out[2] == 1'b1 && tap_b_out[6] == 1'b1, "group B taps exported");
    faults[0] = '{kind: F_STUCK1, wire_a: 8'd2, seg_a: 8'd0, wire_b: 8'd0};
    phase(0, r); check(r == 8'b0100_0100, $sformatf("group A fault, external group %b", r));
    use_ext_b = 1'b0;

    // Scan ORA capture of pattern 4'b0101 on group A with wire 3 stuck at 0
    // from segment 1: far tap sees 0101, near tap sees 0101 too (segment 0
    // is before the fault); pattern 4'b1010 shows the fault at the far tap.
    foreach (faults[i]) faults[i] = NO_FAULT;
    faults[0] = '{kind: F_STUCK0, wire_a: 8'd3, seg_a: 8'd1, wire_b: 8'd0};
    for (int tgt = 5; tgt <= 10; tgt += 5) begin
      flip = 1'b0;
      ora_cfg = ORA_CAPTURE_A;
      roll = 1'b1;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (pattern != 4'(tgt)) @(negedge clk);
      @(negedge clk);        // capture edge
      pause = 1'b1;
      shift_out(r);
      pause = 1'b0;
      check(r[3:0] == (4'(tgt) & 4'b0111), $sformatf("far tap captured %b", r[3:0]));
      check(r[7:4] == 4'(tgt), $sformatf("near tap captured %b", r[7:4]));
      ora_cfg = ORA_CAPTURE_B;
      while (pattern != 4'(tgt)) @(negedge clk);
      @(negedge clk);
      shift_out(r);
      check(r == {2{4'(tgt)}}, $sformatf("group B captured %b", r));
    end
    roll = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
