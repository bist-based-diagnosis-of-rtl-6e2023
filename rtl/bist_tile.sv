// bist_tile: one interconnect BIST structure inside a self-testing area
// (STAR).
//
// A TPG drives the same exhaustive patterns onto two groups of W wires under
// test and the complement onto the aggressor wires.  ORAs placed at N_TAP
// points along the WUTs compare group A wire i with group B wire i; tap 0 is
// the far end (the one ORA of a fault-detection configuration) and tap
// N_TAP-1 is the near end, next to the TPG.  With flip set the TPG drives
// the other end of the WUTs, so the taps see the WUTs from the opposite
// direction; comparing which ORAs fail in the two directions brackets an
// open.  All ORAs of the tile form one scan chain, tap 0 first; in it
// position t*W + i holds tap t, wire pair i.  For two-testing, use_ext_b
// makes the ORAs compare group A with another tile's group B (ext_b, taken
// from that tile's tap_b_out) instead of this tile's own group B.
// split_en/split_at divide the WUTs into two smaller tiles at one CIP, the
// second half driven by a second TPG showing the same pattern.
//
// Interface and timing: one clock (the test clock).  start/pause/roll/done
// are those of the TPG; ora_clr, scan_mode and ora_cfg those of the ORA
// chain.  The fabric between TPG and ORAs is combinational, so the pattern
// the TPG shows in a cycle is compared or captured at the end of that cycle.
//
// The TPG / WUT / ORA arrangement, multiple ORAs along the WUTs, the
// flipped configuration, comparing a group against a second group and
// dividing a tile follow the document.  The evenly spaced tap
// positions, the chain order and the run-time flip input are this design's
// own.
module bist_tile
  import bist_pkg::*;
#(
  parameter int unsigned W     = 8,   // WUTs per group = TPG counter width
  parameter int unsigned SEGS  = 20,  // segments per WUT
  parameter int unsigned N_AGG = 5,   // aggressor wires
  parameter int unsigned NF    = 6,   // injectable faults
  parameter int unsigned N_TAP = 4    // ORA positions along the WUTs
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   pause,
  input  logic                   roll,
  input  logic                   flip,
  input  logic                   split_en,
  input  logic [SEG_IDX_W-1:0]   split_at,
  input  logic [2*W-1:0][SEGS:0] cip_on,
  input  fault_t [NF-1:0]        faults,
  input  logic                   ora_clr,
  input  logic                   scan_mode,
  input  ora_cfg_e               ora_cfg,
  input  logic                   use_ext_b,
  input  logic [N_TAP*W-1:0]     ext_b,
  output logic [N_TAP*W-1:0]     tap_b_out,
  input  logic                   scan_in,
  output logic                   scan_out,
  output logic [W-1:0]           pattern,
  output logic                   active,
  output logic                   done,
  output logic                   wrap,
  output logic [N_TAP*W-1:0]     ora_q
);

  logic [N_AGG-1:0]            agg;
  logic [2*W-1:0][SEGS-1:0]    seg;
  logic [N_TAP*W-1:0]          tap_a, tap_b;

  // Segment index of tap t.
  function automatic int unsigned tap_pos(int unsigned t);
    if (N_TAP < 2) return SEGS - 1;
    return (SEGS - 1) - (t * (SEGS - 1)) / (N_TAP - 1);
  endfunction

  tpg #(.WIDTH(W), .N_AGG(N_AGG)) u_tpg (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .pause  (pause),
    .roll   (roll),
    .pattern(pattern),
    .agg    (agg),
    .active (active),
    .done   (done),
    .wrap   (wrap)
  );

  wut_fabric #(.W(W), .SEGS(SEGS), .N_AGG(N_AGG), .NF(NF)) u_fabric (
    .drv_a (pattern),
    .drv_b (pattern),
    .agg   (agg),
    .cip_on(cip_on),
    .flip  (flip),
    .split_en(split_en),
    .split_at(split_at),
    .faults(faults),
    .seg   (seg)
  );

  for (genvar t = 0; t < N_TAP; t++) begin : g_tap
    for (genvar i = 0; i < W; i++) begin : g_wire
      assign tap_a[t*W + i] = seg[i][tap_pos(t)];
      assign tap_b[t*W + i] = seg[W + i][tap_pos(t)];
    end
  end

  assign tap_b_out = tap_b;

  ora_chain #(.N(N_TAP * W)) u_ora (
    .tck      (clk),
    .rst_n    (rst_n),
    .clr      (ora_clr),
    .scan_mode(scan_mode),
    .cfg      (ora_cfg),
    .wut_a    (tap_a),
    .wut_b    (use_ext_b ? ext_b : tap_b),
    .scan_in  (scan_in),
    .scan_out (scan_out),
    .q        (ora_q)
  );

endmodule
