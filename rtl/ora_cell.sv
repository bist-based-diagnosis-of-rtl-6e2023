// ora_cell: comparison-based output response analyzer with an integrated
// scan register bit.
//
// One cell compares one pair of wires under test, WUTA and WUTB, which carry
// the same test pattern when fault-free.  In compare operation the flip-flop
// loads (WUTA xor WUTB) or its own output, so a single mismatch at any clock
// edge is latched until the cell is cleared.  In shift operation the
// flip-flop loads Scan In, the output of the previous ORA of the chain, so
// the pass/fail bits of all ORAs can be read out serially.
//
// Interface and timing: everything is sampled on the rising edge of tck.
// scan_mode selects the flip-flop's input: 1 the compare path, 0 Scan In.
// scan_out is the flip-flop output (1 = a mismatch was seen).  clr is a
// synchronous clear with priority over both paths; rst_n an asynchronous
// reset.
//
// The XOR/OR compare-and-latch path, the two-input select with the compare
// path on input 1 and Scan In on input 0, and the signal names follow the
// document's drawing of the cell.  The clear and the reset stand for the
// initialisation a configuration download gives the flip-flop, and are this
// design's own.
module ora_cell (
  input  logic tck,
  input  logic rst_n,
  input  logic clr,
  input  logic scan_mode,
  input  logic wut_a,
  input  logic wut_b,
  input  logic scan_in,
  output logic scan_out
);

  logic compare_d;

  assign compare_d = (wut_a ^ wut_b) | scan_out;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n)         scan_out <= 1'b0;
    else if (clr)       scan_out <= 1'b0;
    else if (scan_mode) scan_out <= compare_d;
    else                scan_out <= scan_in;
  end

endmodule
