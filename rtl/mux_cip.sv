// mux_cip: multiplexer configurable interconnect point (MUX CIP) with fault
// injection.
//
// A MUX CIP is a group of transmission gates sharing one output wire.  In the
// decoded variety N_IN = 2^k gates are controlled by k configuration bits
// through a decoder, so exactly one input is connected.  In the non-decoded
// variety every gate has its own configuration bit and at most one of them
// may be set.  The output is buffered.
//
// Faults are injected per gate: stuck_open keeps a gate off whatever its
// configuration, stuck_closed keeps it on.  When no gate conducts the
// output floats and reads OPEN_VAL; when several conduct, the connected
// inputs are bridged and the output is their wired-AND (BRIDGE_OR = 0) or
// wired-OR (BRIDGE_OR = 1).  Testing a MUX CIP therefore takes one
// configuration per input, driving 0 and 1 on the selected input and the
// opposite value on all the others.
//
// Interface and timing: combinational.  cfg holds the k decoded bits in its
// low bits (DECODED = 1) or one bit per input (DECODED = 0).  conducting
// shows which gates are on.
//
// Decoded and non-decoded structure and the fault types follow the
// document; the floating value and the bridge function are this design's
// own choices.
module mux_cip #(
  parameter int unsigned N_IN      = 4,    // inputs (2^k when decoded)
  parameter bit          DECODED   = 1'b0, // 1: k = log2(N_IN) decoded bits
  parameter bit          BRIDGE_OR = 1'b0, // bridge of several inputs
  parameter bit          OPEN_VAL  = 1'b1  // value of a floating output
) (
  input  logic [N_IN-1:0] in,
  input  logic [N_IN-1:0] cfg,
  input  logic [N_IN-1:0] stuck_open,
  input  logic [N_IN-1:0] stuck_closed,
  output logic [N_IN-1:0] conducting,
  output logic            out
);

  localparam int unsigned SEL_W = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [N_IN-1:0] closed;

  always_comb begin
    if (DECODED) begin
      closed = '0;
      for (int unsigned i = 0; i < N_IN; i++)
        if (cfg[SEL_W-1:0] == SEL_W'(i)) closed[i] = 1'b1;
    end else begin
      closed = cfg;
    end
    conducting = (closed & ~stuck_open) | stuck_closed;
  end

  always_comb begin
    if (conducting == '0)  out = OPEN_VAL;
    else if (BRIDGE_OR)    out = |(in & conducting);
    else                   out = &(in | ~conducting);
  end

endmodule
