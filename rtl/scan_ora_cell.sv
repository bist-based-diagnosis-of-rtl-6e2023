// scan_ora_cell: scan ORA, the diagnostic variant of the output response
// analyzer.
//
// Instead of comparing two wires, the cell's look-up table passes one wire
// under test unchanged to the flip-flop, which therefore holds the value the
// wire carried at the last clock edge: the response to one individual test
// pattern.  Switching to shift operation turns the flip-flops of all scan
// ORAs into one shift register through which the captured pattern is read
// out.  Because one flip-flop now observes only one net, only one WUT of a
// compared pair is examined per configuration.
//
// Interface and timing: rising edge of tck.  scan_mode = 1 captures wut,
// scan_mode = 0 loads scan_in (the previous cell's scan_out).  clr is a
// synchronous clear, rst_n an asynchronous reset.
//
// Capture of individual responses, chaining and one-net-per-flip-flop follow
// the document.  Using the same select polarity as the comparator ORA cell,
// the clear and the reset are this design's own choices.
module scan_ora_cell (
  input  logic tck,
  input  logic rst_n,
  input  logic clr,
  input  logic scan_mode,
  input  logic wut,
  input  logic scan_in,
  output logic scan_out
);

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n)         scan_out <= 1'b0;
    else if (clr)       scan_out <= 1'b0;
    else if (scan_mode) scan_out <= wut;
    else                scan_out <= scan_in;
  end

endmodule
