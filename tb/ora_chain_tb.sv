// ora_chain_tb: self-checking testbench for a chain of ORAs.
// Compare configuration: random single and multiple mismatching pairs must
// appear, in position order, in the shifted-out stream.  Scan ORA
// configurations: the captured group A or group B values must be shifted
// out in position order.
module ora_chain_tb;
  import bist_pkg::*;
  localparam int unsigned N = 8;

  logic tck = 1'b0, rst_n = 1'b0, clr = 1'b0, scan_mode = 1'b1, scan_in = 1'b0;
  ora_cfg_e cfg = ORA_COMPARE;
  logic [N-1:0] wut_a = '0, wut_b = '0, q;
  logic scan_out;
  int checks = 0, failures = 0;

  ora_chain #(.N(N)) dut (.*);

  always #5 tck = ~tck;

  initial begin
    repeat (100000) @(posedge tck);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Shift N bits out; bit k of the result is the k-th bit out.
  task automatic shift_out(output logic [N-1:0] r);
    scan_mode = 1'b0;
    for (int k = 0; k < N; k++) begin
      r[k] = scan_out;
      @(negedge tck);
    end
    scan_mode = 1'b1;
  endtask

  initial begin
    logic [N-1:0] fail_mask, got, a_val, b_val;
    repeat (2) @(negedge tck);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      // Compare phase with a random set of failing pairs.
      cfg = ORA_COMPARE;
      fail_mask = (t < N) ? N'(1) << t : N'($urandom) & N'($urandom);
      clr = 1'b1;
      @(negedge tck);
      clr = 1'b0;
      for (int p = 0; p < 16; p++) begin
        wut_a = N'($urandom);
        // A faulty pair mismatches in one random pattern only.
        wut_b = wut_a ^ (($urandom_range(0, 15) == p) ? fail_mask : '0);
        if (p == 15) wut_b = wut_a ^ fail_mask;
        @(negedge tck);
      end
      wut_b = wut_a;
      checks++;
      if (q !== fail_mask) begin
        failures++;
        $display("FAIL: parallel view %b want %b", q, fail_mask);
      end
      shift_out(got);
      checks++;
      if (got !== fail_mask) begin
        failures++;
        $display("FAIL: shifted %b want %b", got, fail_mask);
      end
      // Scan ORA capture of one pattern, group A then group B.
      a_val = N'($urandom);
      b_val = N'($urandom);
      for (int g = 0; g < 2; g++) begin
        cfg = (g == 0) ? ORA_CAPTURE_A : ORA_CAPTURE_B;
        wut_a = a_val;
        wut_b = b_val;
        @(negedge tck);
        wut_a = ~a_val;
        wut_b = ~b_val;
        shift_out(got);
        checks++;
        if (got !== ((g == 0) ? a_val : b_val)) begin
          failures++;
          $display("FAIL: capture %0d got %b", g, got);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
