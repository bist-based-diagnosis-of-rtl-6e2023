// wut_fabric: logic-level model of the programmable interconnect that a BIST
// structure configures into wires under test (WUTs), with fault injection.
//
// The fabric holds two groups of W WUTs (group A = wires 0..W-1, group B =
// wires W..2W-1).  Each WUT is a chain of SEGS wire segments joined by
// break-point CIPs: CIP k lies between segment k-1 and segment k, CIP 0
// connects the near-end driver to segment 0 and CIP SEGS connects the
// far-end driver to segment SEGS-1.  A CIP passes the value when its
// configuration bit (cip_on) is set; a segment cut off from its driver
// floats and reads OPEN_VAL.  With flip = 0 the TPG drives the near end and
// values travel from segment 0 upwards; with flip = 1 the configuration is
// mirrored and the TPG drives the far end.  With split_en the WUTs are
// divided at CIP split_at: a second TPG with the same pattern drives the
// segments beyond that CIP through it, so each half is tested on its own
// (divide-and-conquer).  N_AGG aggressor wires (the wires
// an open CIP separates from the WUTs) are addressed as wires 2W and up.
//
// Up to NF faults are injected through descriptors, as a fault emulator does
// by altering configuration bits: a segment stuck at 0 or 1, a CIP
// stuck-open, and a short between a WUT segment and the same segment of
// another WUT, or an aggressor, that behaves as dominant, wired-AND or
// wired-OR.  A fault on a segment carries on to every segment downstream of
// it along the signal direction.  A segment cut off from its driver (CIP
// off or stuck-open) does not disturb a segment it is shorted to, which is
// what lets progressive net deletion find the shorted segment.  Shorts are resolved from the fault-free
// values of both wires, so a short does not see the effect of a second fault.
//
// Interface and timing: purely combinational; seg gives the value of every
// segment.  The fault models and the segment/CIP structure follow the
// document.  The value of a floating segment, the chain-of-break-points
// topology, the single level of short resolution and the descriptor format
// are this design's own simplifications.
module wut_fabric
  import bist_pkg::*;
#(
  parameter int unsigned W        = 8,   // WUTs per group
  parameter int unsigned SEGS     = 20,  // segments per WUT
  parameter int unsigned N_AGG    = 5,   // aggressor wires
  parameter int unsigned NF       = 6,   // fault slots
  parameter bit          OPEN_VAL = 1'b1 // value read on a floating segment
) (
  input  logic [W-1:0]                drv_a,
  input  logic [W-1:0]                drv_b,
  input  logic [N_AGG-1:0]            agg,
  input  logic [2*W-1:0][SEGS:0]      cip_on,
  input  logic                        flip,
  input  logic                        split_en,
  input  logic [SEG_IDX_W-1:0]        split_at,
  input  fault_t [NF-1:0]             faults,
  output logic [2*W-1:0][SEGS-1:0]    seg
);

  localparam int unsigned NW = 2 * W;

  logic [NW-1:0]            drv;
  logic [NW-1:0][SEGS:0]    cip_eff;
  logic [NW-1:0][SEGS-1:0]  stuck_en, stuck_val;
  logic [NW-1:0][SEGS-1:0]  ovr_en, ovr_val;
  logic [NW-1:0][SEGS-1:0]  clean, driven;

  assign drv = {drv_b, drv_a};

  // Decode the fault descriptors that do not depend on signal values.
  always_comb begin
    int unsigned wa, sa;
    cip_eff   = cip_on;
    stuck_en  = '0;
    stuck_val = '0;
    for (int f = 0; f < NF; f++) begin
      wa = int'(faults[f].wire_a);
      sa = int'(faults[f].seg_a);
      if (wa < NW) begin
        if (faults[f].kind == F_CIP_OPEN && sa <= SEGS)
          cip_eff[wa][sa] = 1'b0;
        if ((faults[f].kind == F_STUCK0 || faults[f].kind == F_STUCK1) && sa < SEGS) begin
          stuck_en[wa][sa]  = 1'b1;
          stuck_val[wa][sa] = (faults[f].kind == F_STUCK1);
        end
      end
    end
  end

  // Propagate values along every WUT, applying opens, stuck-ats and the
  // per-segment overrides (a short drives a segment even when it floats).
  function automatic logic [NW-1:0][SEGS-1:0] propagate(
      input logic [NW-1:0]           d,
      input logic                    flp,
      input logic                    spl,
      input int unsigned             spl_at,
      input logic [NW-1:0][SEGS:0]   cip,
      input logic [NW-1:0][SEGS-1:0] s_en,
      input logic [NW-1:0][SEGS-1:0] s_val,
      input logic [NW-1:0][SEGS-1:0] o_en,
      input logic [NW-1:0][SEGS-1:0] o_val);
    logic [NW-1:0][SEGS-1:0] r;
    logic prev, v;
    int unsigned k, c;
    r = '0;
    for (int unsigned w = 0; w < NW; w++) begin
      prev = d[w];
      for (int unsigned i = 0; i < SEGS; i++) begin
        k = flp ? (SEGS - 1 - i) : i;   // segment reached i-th
        c = flp ? (k + 1) : k;          // CIP feeding it
        if (spl && c == spl_at) prev = d[w];  // second TPG of a split tile
        v = cip[w][c] ? prev : OPEN_VAL;
        if (o_en[w][k]) v = o_val[w][k];
        if (s_en[w][k]) v = s_val[w][k];
        r[w][k] = v;
        prev    = v;
      end
    end
    return r;
  endfunction

  // Which segments are connected to a driver (the TPG or a stuck-at).
  function automatic logic [NW-1:0][SEGS-1:0] reach(
      input logic                    flp,
      input logic                    spl,
      input int unsigned             spl_at,
      input logic [NW-1:0][SEGS:0]   cip,
      input logic [NW-1:0][SEGS-1:0] s_en);
    logic [NW-1:0][SEGS-1:0] r;
    logic prev;
    int unsigned k, c;
    r = '0;
    for (int unsigned w = 0; w < NW; w++) begin
      prev = 1'b1;
      for (int unsigned i = 0; i < SEGS; i++) begin
        k = flp ? (SEGS - 1 - i) : i;
        c = flp ? (k + 1) : k;
        if (spl && c == spl_at) prev = 1'b1;
        r[w][k] = (cip[w][c] & prev) | s_en[w][k];
        prev    = r[w][k];
      end
    end
    return r;
  endfunction

  assign clean  = propagate(drv, flip, split_en, int'(split_at), cip_eff, stuck_en, stuck_val, '0, '0);
  assign driven = reach(flip, split_en, int'(split_at), cip_eff, stuck_en);

  // Resolve shorts from the fault-free values of both wires.  A segment cut
  // off from every driver does not disturb the segment it is shorted to; it
  // takes that segment's value instead.
  always_comb begin
    logic own, other, res, own_d, other_d, other_wut;
    int unsigned wa, wb, sa;
    ovr_en  = '0;
    ovr_val = '0;
    for (int f = 0; f < NF; f++) begin
      wa = int'(faults[f].wire_a);
      wb = int'(faults[f].wire_b);
      sa = int'(faults[f].seg_a);
      if ((faults[f].kind == F_SHORT_DOM || faults[f].kind == F_SHORT_AND ||
           faults[f].kind == F_SHORT_OR) && wa < NW && sa < SEGS &&
          wb < NW + N_AGG && wb != wa) begin
        other_wut = (wb < NW);
        own       = clean[wa][sa];
        own_d     = driven[wa][sa];
        other     = other_wut ? clean[wb % NW][sa] : agg[(wb - NW) % N_AGG];
        other_d   = other_wut ? driven[wb % NW][sa] : 1'b1;
        if (own_d && other_d) begin
          case (faults[f].kind)
            F_SHORT_AND: res = own & other;
            F_SHORT_OR:  res = own | other;
            default:     res = other;
          endcase
        end else begin
          res = own_d ? own : other;
        end
        if (own_d || other_d) begin
          ovr_en[wa][sa]  = 1'b1;
          ovr_val[wa][sa] = res;
          if (other_wut && (faults[f].kind != F_SHORT_DOM || !other_d)) begin
            ovr_en[wb % NW][sa]  = 1'b1;
            ovr_val[wb % NW][sa] = res;
          end
        end
      end
    end
  end

  assign seg = propagate(drv, flip, split_en, int'(split_at), cip_eff, stuck_en, stuck_val, ovr_en, ovr_val);

endmodule
