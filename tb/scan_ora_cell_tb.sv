// scan_ora_cell_tb: self-checking testbench for the scan ORA cell.
// In capture operation the flip-flop must hold the wire's value of the last
// edge; in shift operation it loads Scan In; clear has priority.
module scan_ora_cell_tb;
  logic tck = 1'b0, rst_n = 1'b0, clr = 1'b0, scan_mode = 1'b1;
  logic wut = 1'b0, scan_in = 1'b0, scan_out;
  logic ref_q;
  int checks = 0, failures = 0;

  scan_ora_cell dut (.*);

  always #5 tck = ~tck;

  initial begin
    repeat (100000) @(posedge tck);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge tck);
    rst_n = 1'b1;
    checks++;
    if (scan_out !== 1'b0) begin
      failures++;
      $display("FAIL: reset value");
    end
    ref_q = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      wut       = 1'($urandom);
      scan_in   = 1'($urandom);
      scan_mode = 1'($urandom);
      clr       = ($urandom_range(0, 31) == 0);
      if (clr)            ref_q = 1'b0;
      else if (scan_mode) ref_q = wut;
      else                ref_q = scan_in;
      @(negedge tck);
      checks++;
      if (scan_out !== ref_q) begin
        failures++;
        $display("FAIL: step %0d q=%0b want %0b", i, scan_out, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
