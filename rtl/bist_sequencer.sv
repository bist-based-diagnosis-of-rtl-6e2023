// bist_sequencer: runs one test phase of the interconnect BIST once the FPGA
// holds the BIST configuration.
//
// Fault detection (scan_ora = 0): clear the ORAs and start the TPGs in the
// same cycle, let the TPGs run through all their patterns with the ORAs
// comparing, then switch the ORAs to shift operation and read the chain of
// CHAIN_LEN pass/fail bits out.
//
// Scan ORA diagnosis (scan_ora = 1): start the TPGs in roll-over mode with
// the ORAs capturing, wait for the cycle in which the TPG shows the pattern
// of interest (target), then switch to shift operation, so the chain holds
// the WUT values for exactly that pattern, and read them out.  With
// hold_tpg the TPGs are paused during the read-out (clock enable);
// otherwise they keep counting.  A go with cont = 1 skips the restart and
// waits for the next target from wherever the TPGs are: a pattern they have
// already passed is reached again after they roll over.
//
// Interface and timing: go is sampled in IDLE.  res_bit/res_valid/res_idx
// give one chain bit per cycle for CHAIN_LEN cycles, chain position
// res_idx first at 0.  phase_done pulses for one cycle at the end.  In
// fault detection the read-out starts the cycle after the TPG's done, so a
// phase takes 1 + 2^TPG_W + 1 + CHAIN_LEN cycles from go to phase_done.
//
// The steps of a phase, capture of a pattern of interest, roll-over and
// pausing follow the document; the state machine and its timing are this
// design's own.
module bist_sequencer #(
  parameter int unsigned TPG_W     = 8,    // TPG counter width
  parameter int unsigned CHAIN_LEN = 320,  // ORA bits in the scan chain
  localparam int unsigned IDX_W    = $clog2(CHAIN_LEN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic             cont,
  input  logic             scan_ora,
  input  logic             hold_tpg,
  input  logic [TPG_W-1:0] target,
  input  logic             tpg_done,
  input  logic [TPG_W-1:0] tpg_pattern,
  input  logic             chain_out,
  output logic             tpg_start,
  output logic             tpg_pause,
  output logic             tpg_roll,
  output logic             ora_clr,
  output logic             scan_mode,
  output logic             res_bit,
  output logic             res_valid,
  output logic [IDX_W-1:0] res_idx,
  output logic             busy,
  output logic             phase_done
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_RUN, S_WAIT, S_SHIFT, S_END} state_e;

  state_e           state;
  logic             mode_scan;  // phase is a scan ORA capture
  logic [TPG_W-1:0] target_q;
  logic [IDX_W-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode_scan <= 1'b0;
      target_q  <= '0;
      idx       <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          mode_scan <= scan_ora;
          target_q  <= target;
          state     <= (scan_ora && cont) ? S_WAIT : S_START;
        end
        S_START: state <= mode_scan ? S_WAIT : S_RUN;
        S_RUN:   if (tpg_done) begin
          idx   <= '0;
          state <= S_SHIFT;
        end
        S_WAIT:  if (tpg_pattern == target_q) begin
          idx   <= '0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          if (idx == IDX_W'(CHAIN_LEN - 1)) state <= S_END;
          idx <= idx + 1'b1;
        end
        S_END:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end


  assign tpg_start  = (state == S_START);
  assign ora_clr    = (state == S_START);
  assign tpg_roll   = mode_scan;
  assign tpg_pause  = (state == S_SHIFT) && mode_scan && hold_tpg;
  assign scan_mode  = (state != S_SHIFT);
  assign res_bit    = chain_out;
  assign res_valid  = (state == S_SHIFT);
  assign res_idx    = idx;
  assign busy       = (state != S_IDLE);
  assign phase_done = (state == S_END);

endmodule
