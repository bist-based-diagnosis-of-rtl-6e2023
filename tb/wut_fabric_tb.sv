// wut_fabric_tb: self-checking testbench for the interconnect model.
// Random single faults (stuck-at, CIP stuck-open, dominant / wired-AND /
// wired-OR shorts between WUTs and to aggressors) and random CIPs turned off
// are applied in both signal directions; every segment is compared with a
// reference that works out, per segment, which CIPs lie between it and its
// driver and where the fault sits relative to it.
module wut_fabric_tb;
  import bist_pkg::*;
  localparam int unsigned W = 3, SEGS = 6, N_AGG = 2, NF = 2;
  localparam int unsigned NW = 2 * W;
  localparam bit OPEN_VAL = 1'b1;

  logic [W-1:0] drv_a, drv_b;
  logic [N_AGG-1:0] agg;
  logic [NW-1:0][SEGS:0] cip_on;
  logic flip;
  logic split_en = 1'b0;
  logic [SEG_IDX_W-1:0] split_at = '0;
  fault_t [NF-1:0] faults;
  logic [NW-1:0][SEGS-1:0] seg;
  int checks = 0, failures = 0;
  int seen[fault_kind_e];

  wut_fabric #(.W(W), .SEGS(SEGS), .N_AGG(N_AGG), .NF(NF)) dut (.*);

  // CIP feeding segment j in the current direction.
  function automatic int feed(int j);
    return flip ? j + 1 : j;
  endfunction

  // Is CIP c of wire w conducting (configuration and stuck-open fault)?
  function automatic bit cip_ok(int w, int c);
    if (!cip_on[w][c]) return 0;
    if (faults[0].kind == F_CIP_OPEN && int'(faults[0].wire_a) == w && int'(faults[0].seg_a) == c) return 0;
    return 1;
  endfunction

  // Segment j lies at or beyond segment from along the signal direction.
  function automatic bit beyond(int j, int from);
    return flip ? (j <= from) : (j >= from);
  endfunction

  // Any CIP off on w among those feeding segments lo..hi (inclusive).
  function automatic bit cut_range(int w, int j0, int j1);
    int lo, hi;
    lo = (j0 < j1) ? j0 : j1;
    hi = (j0 < j1) ? j1 : j0;
    for (int j = lo; j <= hi; j++)
      if (!cip_ok(w, feed(j))) return 1;
    return 0;
  endfunction

  // Segments from the driver up to and including j.
  function automatic bit cut_to(int w, int j);
    return flip ? cut_range(w, j, SEGS - 1) : cut_range(w, 0, j);
  endfunction

  // Segments strictly after from up to and including j.
  function automatic bit cut_after(int w, int from, int j);
    if (j == from) return 0;
    return flip ? cut_range(w, j, from - 1) : cut_range(w, from + 1, j);
  endfunction

  function automatic logic drive_of(int w);
    return (w < W) ? drv_a[w] : drv_b[w - W];
  endfunction

  function automatic logic expected(int w, int j);
    fault_t f;
    logic v, own, oth, res;
    bit own_d, oth_d;
    int a, b, ks;
    f  = faults[0];
    a  = int'(f.wire_a);
    b  = int'(f.wire_b);
    ks = int'(f.seg_a);
    v = cut_to(w, j) ? OPEN_VAL : drive_of(w);
    if ((f.kind == F_STUCK0 || f.kind == F_STUCK1) && w == a && beyond(j, ks))
      v = cut_after(w, ks, j) ? OPEN_VAL : (f.kind == F_STUCK1);
    if (f.kind inside {F_SHORT_DOM, F_SHORT_AND, F_SHORT_OR}) begin
      own_d = !cut_to(a, ks);
      own   = own_d ? drive_of(a) : OPEN_VAL;
      oth_d = (b < NW) ? !cut_to(b, ks) : 1'b1;
      oth   = (b < NW) ? (oth_d ? drive_of(b) : OPEN_VAL) : agg[b - NW];
      if (own_d || oth_d) begin
        if (own_d && oth_d)
          res = (f.kind == F_SHORT_AND) ? (own & oth) :
                (f.kind == F_SHORT_OR)  ? (own | oth) : oth;
        else
          res = own_d ? own : oth;
        if (w == a && beyond(j, ks))
          v = cut_after(w, ks, j) ? OPEN_VAL : res;
        if (b < NW && w == b && beyond(j, ks) && (f.kind != F_SHORT_DOM || !oth_d))
          v = cut_after(w, ks, j) ? OPEN_VAL : res;
      end
    end
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic fault_kind_e kinds[7] = '{F_NONE, F_STUCK0, F_STUCK1, F_CIP_OPEN, F_SHORT_DOM, F_SHORT_AND, F_SHORT_OR};
    for (int t = 0; t < 3000; t++) begin
      fault_t f;
      f.kind   = kinds[$urandom_range(0, 6)];
      f.wire_a = WIRE_IDX_W'($urandom_range(0, NW - 1));
      f.seg_a  = SEG_IDX_W'((f.kind == F_CIP_OPEN) ? $urandom_range(0, SEGS) : $urandom_range(0, SEGS - 1));
      do f.wire_b = WIRE_IDX_W'($urandom_range(0, NW + N_AGG - 1)); while (f.wire_b == f.wire_a);
      faults[0] = f;
      faults[1] = NO_FAULT;
      seen[f.kind]++;
      cip_on = '1;
      // Turn one CIP off: anywhere when there is no fault, on the short's
      // partner wire otherwise (the progressive-deletion situation).
      if ($urandom_range(0, 1) == 1) begin
        if (f.kind == F_NONE) cip_on[$urandom_range(0, NW - 1)][$urandom_range(0, SEGS)] = 1'b0;
        else if (f.kind inside {F_SHORT_DOM, F_SHORT_AND, F_SHORT_OR} && int'(f.wire_b) < NW)
          cip_on[f.wire_b][$urandom_range(0, SEGS)] = 1'b0;
      end
      flip = 1'($urandom);
      for (int p = 0; p < 4; p++) begin
        drv_a = W'($urandom);
        drv_b = (p == 0) ? drv_a : W'($urandom);
        agg   = N_AGG'($urandom);
        #1;
        for (int w = 0; w < NW; w++)
          for (int j = 0; j < SEGS; j++) begin
            checks++;
            if (seg[w][j] !== expected(w, j)) begin
              failures++;
              if (failures < 10)
                $display("FAIL: t=%0d kind=%s a=%0d s=%0d b=%0d flip=%0b w=%0d j=%0d got %0b", t,
                         f.kind.name(), f.wire_a, f.seg_a, f.wire_b, flip, w, j, seg[w][j]);
            end
          end
      end
    end
    // Two faults at once: stuck-at-1 near end and stuck-at-0 further on.
    cip_on = '1;
    flip   = 1'b0;
    faults[0] = '{kind: F_STUCK1, wire_a: 8'd1, seg_a: 8'd1, wire_b: 8'd0};
    faults[1] = '{kind: F_STUCK0, wire_a: 8'd1, seg_a: 8'd4, wire_b: 8'd0};
    drv_a = '0;
    drv_b = '0;
    #1;
    checks++;
    if (seg[1] !== 6'b001110) begin
      failures++;
      $display("FAIL: two faults %b", seg[1]);
    end
    // Divide-and-conquer: split at CIP 3, both directions.  A stuck-at-1 in
    // segment 1 (forward) or segment 4 (flipped) stays in its own half.
    faults[1] = NO_FAULT;
    split_en = 1'b1;
    split_at = 8'd3;
    for (int fl = 0; fl < 2; fl++) begin
      flip = fl[0];
      faults[0] = '{kind: F_STUCK1, wire_a: 8'd2, seg_a: (fl == 0) ? 8'd1 : 8'd4, wire_b: 8'd0};
      #1;
      checks++;
      if (seg[2] !== ((fl == 0) ? 6'b000110 : 6'b011000)) begin
        failures++;
        $display("FAIL: split, flip=%0d: %b", fl, seg[2]);
      end
      faults[0] = '{kind: F_CIP_OPEN, wire_a: 8'd2, seg_a: (fl == 0) ? 8'd1 : 8'd5, wire_b: 8'd0};
      #1;
      checks++;
      if (seg[2] !== ((fl == 0) ? 6'b000110 : 6'b011000)) begin
        failures++;
        $display("FAIL: split open, flip=%0d: %b", fl, seg[2]);
      end
    end
    split_en = 1'b0;
    foreach (kinds[i]) begin
      checks++;
      if (seen[kinds[i]] == 0) begin
        failures++;
        $display("FAIL: kind %s never injected", kinds[i].name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
