// bist_pkg: types and constants shared by the FPGA interconnect BIST blocks.
//
// The BIST structure tests groups of wires under test (WUTs): a counter-based
// test pattern generator (TPG) drives two identical groups, and comparator
// output response analyzers (ORAs) look for mismatches at the far end.  The
// package holds the fault descriptor used by the interconnect model to emulate
// the fault models the method targets (wire stuck-at, CIP stuck-open,
// shorts), and the ORA configuration (comparator or scan ORA).
//
// The list of fault models follows the document; the encodings, the index
// widths and the descriptor layout are this design's own choices.
package bist_pkg;

  // Widths of the wire and segment indices inside a fault descriptor.
  localparam int unsigned WIRE_IDX_W = 8;
  localparam int unsigned SEG_IDX_W  = 8;

  // Fault models of the interconnect (stuck-at, stuck-open CIP, bridging).
  // A stuck-closed CIP behaves as a short between its two segments and is
  // expressed as one of the short kinds.
  typedef enum logic [2:0] {
    F_NONE      = 3'd0,  // no fault in this slot
    F_STUCK0    = 3'd1,  // segment stuck at 0 (short to ground)
    F_STUCK1    = 3'd2,  // segment stuck at 1 (short to power)
    F_CIP_OPEN  = 3'd3,  // break-point CIP stuck-open (or open next to it)
    F_SHORT_DOM = 3'd4,  // short, wire_b dominates wire_a
    F_SHORT_AND = 3'd5,  // short, wired-AND of both
    F_SHORT_OR  = 3'd6   // short, wired-OR of both
  } fault_kind_e;

  // One injected fault.  wire_a/seg_a name the victim segment (for
  // F_CIP_OPEN, seg_a is the CIP index: CIP k sits between segment k-1 and
  // segment k, CIP 0 at the near end and CIP SEGS at the far end).  wire_b
  // names the other wire of a short; indices at or above the number of WUTs
  // address the aggressor wires driven by the TPG.
  typedef struct packed {
    fault_kind_e           kind;
    logic [WIRE_IDX_W-1:0] wire_a;
    logic [SEG_IDX_W-1:0]  seg_a;
    logic [WIRE_IDX_W-1:0] wire_b;
  } fault_t;

  localparam fault_t NO_FAULT = '{kind: F_NONE, wire_a: '0, seg_a: '0, wire_b: '0};

  // Function an ORA position is configured for.
  typedef enum logic [1:0] {
    ORA_COMPARE   = 2'd0,  // comparator ORA (latches any mismatch)
    ORA_CAPTURE_A = 2'd1,  // scan ORA observing the group A wire
    ORA_CAPTURE_B = 2'd2   // scan ORA observing the group B wire
  } ora_cfg_e;

endpackage
