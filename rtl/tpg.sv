// tpg: counter-based test pattern generator for the wires under test (WUTs).
//
// The TPG applies exhaustive patterns: an N-bit binary counter walks through
// all 2^N values, and the same value drives every WUT group of the BIST
// structure.  Wires that may be shorted to the WUTs through an open CIP
// (the aggressor wires) are driven with the complement of the counter's most
// significant bit, so that when the WUTs carry all 0s the aggressors carry 1
// and when the WUTs carry all 1s the aggressors carry 0, each at least once.
//
// Interface and timing:
//   start   one-cycle pulse (BIST Start) clears the counter and starts the
//           sequence; pattern 0 is on the outputs in the first cycle after
//           the start edge, pattern k in the k-th cycle after it.
//   pause   clock enable, active low: while high the counter holds its
//           pattern (used to keep a pattern of interest during a scan-out).
//   roll    while high the counter rolls over from 2^N-1 to 0 and keeps
//           running; while low the sequence ends after 2^N patterns.
//   done    (Done) rises 2^N unpaused cycles after start and stays high until
//           the next start; active is high while the sequence runs.
//   wrap    one-cycle pulse each time the counter rolls over.
//
// Exhaustive counting, the aggressor requirement, BIST Start/Done, roll-over
// and pausing follow the document.  The choice of the MSB for the aggressor
// value, the reset values and the hold-after-done behaviour are this
// design's own.
module tpg #(
  parameter int unsigned WIDTH = 8,  // bits of the pattern counter
  parameter int unsigned N_AGG = 5   // aggressor wires driven opposite
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             pause,
  input  logic             roll,
  output logic [WIDTH-1:0] pattern,
  output logic [N_AGG-1:0] agg,
  output logic             active,
  output logic             done,
  output logic             wrap
);

  logic [WIDTH-1:0] count_q;
  logic             last;

  assign last = (count_q == {WIDTH{1'b1}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q <= '0;
      active  <= 1'b0;
      done    <= 1'b0;
      wrap    <= 1'b0;
    end else begin
      wrap <= 1'b0;
      if (start) begin
        count_q <= '0;
        active  <= 1'b1;
        done    <= 1'b0;
      end else if (active && !pause) begin
        if (!last) begin
          count_q <= count_q + 1'b1;
        end else if (roll) begin
          count_q <= '0;
          wrap    <= 1'b1;
        end else begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  assign pattern = count_q;
  assign agg     = {N_AGG{~count_q[WIDTH-1]}};

endmodule
