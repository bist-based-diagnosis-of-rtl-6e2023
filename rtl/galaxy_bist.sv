// galaxy_bist: off-line "galaxy" BIST of FPGA interconnect.
//
// For off-line testing the whole FPGA is filled with self-testing areas
// (STARs) side by side, all running the same test phase in parallel, which
// cuts the number of reconfigurations.  Each STAR holds one BIST tile (TPG,
// two groups of wires under test, ORAs along them).  The ORAs of all STARs
// form one long scan chain, STAR 0 nearest the output, so after a phase the
// result stream can be cut back into per-STAR pieces and each failing STAR
// diagnosed as if it had been tested alone.
//
// One sequencer runs a phase for all STARs: fault detection with comparator
// ORAs, or capture of one pattern of interest with scan ORAs (ora_cfg
// selects which wire of each pair they observe).  Diagnostic configurations
// are set through the ports: two_test (the ORAs of STAR s compare its
// group A with group B of STAR s+1, the last STAR wrapping to STAR 0, so
// every WUT group is compared with a second group), flip (drive the WUTs
// from the other end), split_en/split_at (divide every tile's WUTs at one
// CIP into two halves, each with its own TPG),
// cip_on (turn individual break-point CIPs off, e.g. to delete part of a
// net) and faults (injected faults, one set per STAR).
//
// Interface and timing: one test clock, asynchronous active-low reset.  go
// starts a phase (see bist_sequencer).  During the read-out res_valid is
// high for CHAIN_LEN cycles and res_bit is chain position res_idx; position
// s*TILE_BITS + t*W + i is STAR s, ORA tap t, wire pair i; the last
// position (MUX_BIT) is the ORA of the MUX CIP test.  star_fail[s] is the OR
// of STAR s's bits of the last read-out, mux_fail the MUX CIP ORA bit, both
// valid from phase_done on, and fail_any their OR.
//
// Beside the STARs sits the multiplexer CIP test: two MUX CIPs configured
// alike (mux_cfg, one bit per input) get TPG bit 0 on the selected input and
// its complement on all other inputs, so a stuck-open selected gate or a
// stuck-closed unselected gate (injected through mux_stuck_open /
// mux_stuck_closed, one set per MUX CIP) makes their outputs differ.
//
// Parallel STARs, the long ORA scan chain and its use per STAR follow the
// document; N_STAR = 10 is the number of STAR positions it gives for its
// device.  The per-STAR summary outputs and the port-level configuration
// are this design's own.
module galaxy_bist
  import bist_pkg::*;
#(
  parameter int unsigned N_STAR = 10,  // STARs running in parallel
  parameter int unsigned W      = 8,   // WUTs per group = TPG width
  parameter int unsigned SEGS   = 20,  // segments per WUT
  parameter int unsigned N_AGG  = 5,   // aggressor wires per tile
  parameter int unsigned NF     = 6,   // injectable faults per STAR
  parameter int unsigned N_TAP  = 4,   // ORA positions per tile
  parameter int unsigned MUX_IN = 4,   // inputs of the MUX CIPs under test
  localparam int unsigned TILE_BITS = N_TAP * W,
  localparam int unsigned MUX_BIT   = N_STAR * TILE_BITS,
  localparam int unsigned CHAIN_LEN = MUX_BIT + 1,
  localparam int unsigned IDX_W     = $clog2(CHAIN_LEN + 1)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                go,
  input  logic                                cont,
  input  logic                                scan_ora,
  input  logic                                hold_tpg,
  input  logic [W-1:0]                        target,
  input  ora_cfg_e                            ora_cfg,
  input  logic                                flip,
  input  logic                                two_test,
  input  logic                                split_en,
  input  logic [SEG_IDX_W-1:0]                split_at,
  input  logic [N_STAR-1:0][2*W-1:0][SEGS:0]  cip_on,
  input  fault_t [N_STAR-1:0][NF-1:0]         faults,
  input  logic [MUX_IN-1:0]                   mux_cfg,
  input  logic [1:0][MUX_IN-1:0]              mux_stuck_open,
  input  logic [1:0][MUX_IN-1:0]              mux_stuck_closed,
  output logic                                res_bit,
  output logic                                res_valid,
  output logic [IDX_W-1:0]                    res_idx,
  output logic                                busy,
  output logic                                phase_done,
  output logic [N_STAR-1:0]                   star_fail,
  output logic                                mux_fail,
  output logic                                fail_any,
  output logic [W-1:0]                        tpg_pattern,
  output logic                                tpg_wrap
);

  logic                  tpg_start, tpg_pause, tpg_roll, ora_clr, scan_mode;
  logic [N_STAR:0]       link;
  logic [N_STAR-1:0]     done_s, active_s, wrap_s;
  logic [N_STAR-1:0][W-1:0] pattern_s;
  logic [N_STAR-1:0]     fail_acc;
  logic [N_STAR-1:0][TILE_BITS-1:0] tap_b;
  logic                  mux_acc;
  logic [MUX_IN-1:0]     mux_in;
  logic [1:0]            mux_out;

  // MUX CIP test: two identical non-decoded MUX CIPs; the selected input
  // carries TPG bit 0, every other input the opposite value, and one
  // comparator ORA at the end of the chain compares the two outputs.
  assign mux_in = ({MUX_IN{pattern_s[0][0]}} & mux_cfg) | ({MUX_IN{~pattern_s[0][0]}} & ~mux_cfg);

  for (genvar m = 0; m < 2; m++) begin : g_mux
    logic [MUX_IN-1:0] unused_cond;
    mux_cip #(.N_IN(MUX_IN)) u_mux (
      .in          (mux_in),
      .cfg         (mux_cfg),
      .stuck_open  (mux_stuck_open[m]),
      .stuck_closed(mux_stuck_closed[m]),
      .conducting  (unused_cond),
      .out         (mux_out[m])
    );
  end

  ora_cell u_mux_ora (
    .tck      (clk),
    .rst_n    (rst_n),
    .clr      (ora_clr),
    .scan_mode(scan_mode),
    .wut_a    (mux_out[0]),
    .wut_b    (mux_out[1]),
    .scan_in  (1'b0),
    .scan_out (link[N_STAR])
  );

  for (genvar s = 0; s < N_STAR; s++) begin : g_star
    logic [TILE_BITS-1:0] unused_q;
    bist_tile #(.W(W), .SEGS(SEGS), .N_AGG(N_AGG), .NF(NF), .N_TAP(N_TAP)) u_tile (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (tpg_start),
      .pause    (tpg_pause),
      .roll     (tpg_roll),
      .flip     (flip),
      .split_en (split_en),
      .split_at (split_at),
      .cip_on   (cip_on[s]),
      .faults   (faults[s]),
      .ora_clr  (ora_clr),
      .scan_mode(scan_mode),
      .ora_cfg  (ora_cfg),
      .use_ext_b(two_test),
      .ext_b    (tap_b[(s + 1) % N_STAR]),
      .tap_b_out(tap_b[s]),
      .scan_in  (link[s+1]),
      .scan_out (link[s]),
      .pattern  (pattern_s[s]),
      .active   (active_s[s]),
      .done     (done_s[s]),
      .wrap     (wrap_s[s]),
      .ora_q    (unused_q)
    );
  end

  bist_sequencer #(.TPG_W(W), .CHAIN_LEN(CHAIN_LEN)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .go         (go),
    .cont       (cont),
    .scan_ora   (scan_ora),
    .hold_tpg   (hold_tpg),
    .target     (target),
    .tpg_done   (&done_s),
    .tpg_pattern(pattern_s[0]),
    .chain_out  (link[0]),
    .tpg_start  (tpg_start),
    .tpg_pause  (tpg_pause),
    .tpg_roll   (tpg_roll),
    .ora_clr    (ora_clr),
    .scan_mode  (scan_mode),
    .res_bit    (res_bit),
    .res_valid  (res_valid),
    .res_idx    (res_idx),
    .busy       (busy),
    .phase_done (phase_done)
  );

  // Cut the result stream into per-STAR pass/fail.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail_acc  <= '0;
      mux_acc   <= 1'b0;
      star_fail <= '0;
      mux_fail  <= 1'b0;
    end else begin
      if (tpg_start) begin
        fail_acc <= '0;
        mux_acc  <= 1'b0;
      end
      if (res_valid && res_bit) begin
        if (int'(res_idx) < MUX_BIT) fail_acc[int'(res_idx) / TILE_BITS] <= 1'b1;
        else                         mux_acc <= 1'b1;
      end
      if (phase_done) begin
        star_fail <= fail_acc;
        mux_fail  <= mux_acc;
      end
    end
  end

  assign fail_any    = |star_fail | mux_fail;
  assign tpg_pattern = pattern_s[0];
  assign tpg_wrap    = wrap_s[0];

endmodule
