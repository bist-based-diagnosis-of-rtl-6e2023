// mux_cip_tb: self-checking testbench for decoded and non-decoded MUX CIPs.
// Applies the MUX CIP test: one configuration per input, 0 and 1 on the
// selected input with the opposite value on all others.  Fault-free, the
// output follows the selected input; a stuck-open selected gate or a
// stuck-closed unselected gate must make one of the two patterns fail.
// Random inputs with random gate faults are checked against the bridge rule.
module mux_cip_tb;
  localparam int unsigned N_IN = 4;

  logic [N_IN-1:0] in, cfg_d, cfg_n, so, sc, cond_d, cond_n;
  logic out_d, out_n;
  int checks = 0, failures = 0, detected = 0, faults_tried = 0;

  mux_cip #(.N_IN(N_IN), .DECODED(1'b1)) u_dec (
    .in(in), .cfg(cfg_d), .stuck_open(so), .stuck_closed(sc), .conducting(cond_d), .out(out_d));
  mux_cip #(.N_IN(N_IN), .DECODED(1'b0)) u_nd (
    .in(in), .cfg(cfg_n), .stuck_open(so), .stuck_closed(sc), .conducting(cond_n), .out(out_n));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Wired-AND of the inputs whose gates conduct; floating reads 1.
  function automatic logic ref_out(logic [N_IN-1:0] i, logic [N_IN-1:0] c);
    logic r = 1'b1;
    for (int k = 0; k < N_IN; k++) if (c[k]) r &= i[k];
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fault-free MUX test, one configuration per input.
    so = '0;
    sc = '0;
    for (int s = 0; s < N_IN; s++) begin
      cfg_d = N_IN'(s);
      cfg_n = N_IN'(1) << s;
      for (int v = 0; v < 2; v++) begin
        in = (v != 0) ? (N_IN'(1) << s) : ~(N_IN'(1) << s);
        #1;
        check(out_d == v[0] && out_n == v[0], $sformatf("fault-free sel %0d value %0d", s, v));
        check(cond_d == (N_IN'(1) << s) && cond_n == (N_IN'(1) << s), "one gate conducts");
      end
    end
    // Every single gate fault is detected by the test of some configuration.
    for (int g = 0; g < N_IN; g++) begin
      for (int kind = 0; kind < 2; kind++) begin
        automatic bit hit_d = 0, hit_n = 0;
        so = (kind == 0) ? N_IN'(1) << g : '0;
        sc = (kind == 1) ? N_IN'(1) << g : '0;
        faults_tried++;
        for (int s = 0; s < N_IN; s++) begin
          cfg_d = N_IN'(s);
          cfg_n = N_IN'(1) << s;
          for (int v = 0; v < 2; v++) begin
            in = (v != 0) ? (N_IN'(1) << s) : ~(N_IN'(1) << s);
            #1;
            if (out_d != v[0]) hit_d = 1;
            if (out_n != v[0]) hit_n = 1;
          end
        end
        check(hit_d && hit_n, $sformatf("gate %0d %s detected", g, (kind != 0) ? "stuck-closed" : "stuck-open"));
        if (hit_d && hit_n) detected++;
      end
    end
    // Random check against the bridge rule.
    for (int t = 0; t < 2000; t++) begin
      in    = N_IN'($urandom);
      cfg_d = N_IN'($urandom);
      cfg_n = N_IN'(1) << $urandom_range(0, N_IN - 1);
      so    = ($urandom_range(0, 3) == 0) ? N_IN'($urandom) : '0;
      sc    = ($urandom_range(0, 3) == 0) ? N_IN'($urandom) : '0;
      #1;
      check(out_d == ref_out(in, cond_d) && out_n == ref_out(in, cond_n), "bridge rule");
      check(cond_n == ((cfg_n & ~so) | sc), "non-decoded gate state");
      check(cond_d == (((N_IN'(1) << cfg_d[1:0]) & ~so) | sc), "decoded gate state");
    end
    check(detected == faults_tried, "all gate faults detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
