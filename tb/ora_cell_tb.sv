// ora_cell_tb: self-checking testbench for the comparator ORA / scan cell.
// Random stimulus is checked against a reference written from the cell's
// rules: in compare operation a mismatch is latched until clear; in shift
// operation the cell loads Scan In.
module ora_cell_tb;
  logic tck = 1'b0, rst_n = 1'b0, clr = 1'b0, scan_mode = 1'b1;
  logic wut_a = 1'b0, wut_b = 1'b0, scan_in = 1'b0, scan_out;
  logic ref_q;
  int checks = 0, failures = 0, mism = 0;

  ora_cell dut (.*);

  always #5 tck = ~tck;

  initial begin
    repeat (100000) @(posedge tck);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 1'b0;
    repeat (2) @(negedge tck);
    rst_n = 1'b1;
    // Directed: one mismatch in a long run of matches stays latched.
    for (int i = 0; i < 20; i++) begin
      wut_a = i[0];
      wut_b = (i == 7) ? ~i[0] : i[0];
      @(negedge tck);
      checks++;
      if (scan_out !== (i >= 7)) begin
        failures++;
        $display("FAIL: directed step %0d q=%0b", i, scan_out);
      end
    end
    clr = 1'b1;
    @(negedge tck);
    clr = 1'b0;
    ref_q = 1'b0;
    // Random.
    for (int i = 0; i < 4000; i++) begin
      wut_a     = 1'($urandom);
      wut_b     = ($urandom_range(0, 15) == 0) ? ~wut_a : wut_a;
      scan_in   = 1'($urandom);
      scan_mode = ($urandom_range(0, 3) != 0);
      clr       = ($urandom_range(0, 63) == 0);
      if (clr)            ref_q = 1'b0;
      else if (scan_mode) begin
        if (wut_a != wut_b) begin
          ref_q = 1'b1;
          mism++;
        end
      end
      else                ref_q = scan_in;
      @(negedge tck);
      checks++;
      if (scan_out !== ref_q) begin
        failures++;
        $display("FAIL: step %0d q=%0b want %0b", i, scan_out, ref_q);
      end
    end
    checks++;
    if (mism == 0) begin
      failures++;
      $display("FAIL: no mismatch was applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
