// ora_chain: a row of ORAs, one per compared wire pair, linked into a scan
// chain.
//
// Every position holds a comparator ORA cell and a scan ORA cell; the
// configuration input cfg chooses which one the position is (on the FPGA
// this is a different look-up-table programming of the same logic block).
// The chosen cell's output feeds the Scan In of the next position, so one
// serial path reads all results.  In scan ORA configuration cfg also
// chooses which wire of the pair is observed.
//
// Interface and timing: rising edge of tck.  scan_mode = 1 compares or
// captures, 0 shifts.  Position 0 drives scan_out and position N-1 takes
// scan_in, so in shift operation the k-th bit to come out (k = 0 first,
// available before the first shift edge) is position k.  q shows all
// positions in parallel.
//
// Chaining through Scan In and the two ORA kinds follow the document; the
// order of the positions and the run-time choice between the kinds are this
// design's own.
module ora_chain
  import bist_pkg::*;
#(
  parameter int unsigned N = 8  // compared wire pairs
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         scan_mode,
  input  ora_cfg_e     cfg,
  input  logic [N-1:0] wut_a,
  input  logic [N-1:0] wut_b,
  input  logic         scan_in,
  output logic         scan_out,
  output logic [N-1:0] q
);

  logic [N-1:0] cmp_q, cap_q, cap_wut;
  logic [N:0]   link;

  assign link[N]  = scan_in;
  assign cap_wut  = (cfg == ORA_CAPTURE_B) ? wut_b : wut_a;

  for (genvar i = 0; i < N; i++) begin : g_pos
    ora_cell u_cmp (
      .tck      (tck),
      .rst_n    (rst_n),
      .clr      (clr),
      .scan_mode(scan_mode),
      .wut_a    (wut_a[i]),
      .wut_b    (wut_b[i]),
      .scan_in  (link[i+1]),
      .scan_out (cmp_q[i])
    );
    scan_ora_cell u_cap (
      .tck      (tck),
      .rst_n    (rst_n),
      .clr      (clr),
      .scan_mode(scan_mode),
      .wut      (cap_wut[i]),
      .scan_in  (link[i+1]),
      .scan_out (cap_q[i])
    );
    assign q[i]    = (cfg == ORA_COMPARE) ? cmp_q[i] : cap_q[i];
    assign link[i] = q[i];
  end

  assign scan_out = link[0];

endmodule
