// tb_eecb_scan_top_full -- end-to-end test of the EECB-segmented scan architecture at full size.
//
// The top runs with its default parameters: 5364 scan flops in 5 chains of 1072-1073,
// each cut into 6 segments, for 4 test patterns.
// A stand-in for the functional logic closes the loop: flop i sees
// d[i] = q[i] ^ q[i+1] ^ (i % 3 == 0 ? q[i+5] : 1), indices modulo the flop count.
// Every chain has its own cycle-level reference model; after every clock all flop
// outputs, all EECBs, all segment enables and all scan outputs are compared with it.
//
// Sequence: asynchronous reset; functional operation (EECBs 0, enable 1 loads all flops,
// enable 0 freezes them); then test patterns. Each pattern is shifted in over
// (longest chain + segments per chain) clocks while the previous response shifts out,
// is checked to sit in the intended cells, EECBs included, and is captured with one
// clock (stuck-at) or two (launch-off-capture). The first pattern denies every segment,
// the second enables every segment, the rest use random EECB bits. The test counts each
// mechanism (shift, capture by an enabled segment, capture denied, launch-off-capture
// pair, functional load, functional hold, reset) and fails if one never happened. It also
// checks that a denied segment's flops did not change during capture.
module tb_eecb_scan_top_full;
  import seg_chain_model_pkg::*;

  localparam int F = 5364;
  localparam int C = 5;
  localparam int S = 6;
  localparam int NPAT = 4;

  logic             clk = 1'b0;
  logic             rst, enable, se;
  logic [C-1:0]     si, so;
  logic [F-1:0]     d, q;
  logic [C*S-1:0]   eecb, seg_en;

  eecb_scan_top dut (
    .clk(clk), .rst(rst), .enable(enable), .se(se), .si(si), .so(so),
    .d(d), .q(q), .eecb(eecb), .seg_en(seg_en)
  );

  always #5 clk = ~clk;

  // Stand-in functional logic.
  function automatic logic cut_fn(int i, logic [F-1:0] v);
    return v[i] ^ v[(i + 1) % F] ^ ((i % 3 == 0) ? v[(i + 5) % F] : 1'b1);
  endfunction

  always_comb begin
    for (int i = 0; i < F; i++) d[i] = cut_fn(i, q);
  end

  seg_chain_model mc[C];
  int cstart[C], clen[C];
  int maxlen, K;
  int checks = 0, failures = 0;
  int n_reset = 0, n_shift = 0, n_cap_on = 0, n_cap_off = 0, n_loc = 0, n_sa = 0;
  int n_func_on = 0, n_func_off = 0;
  int cap_toggles = 0;

  function automatic logic [F-1:0] model_q();
    logic [F-1:0] v;
    for (int c = 0; c < C; c++)
      for (int i = 0; i < clen[c]; i++) v[cstart[c] + i] = mc[c].q(i);
    return v;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", msg, $time);
  endtask

  task automatic compare(string what);
    logic [F-1:0] mq = model_q();
    checks++;
    if (q !== mq) fail({what, ": flop outputs"});
    for (int c = 0; c < C; c++) begin
      if (so[c] !== mc[c].so()) fail({what, ": scan out"});
      for (int s = 0; s < S; s++) begin
        if (eecb[c*S + s] !== mc[c].eecb(s)) fail({what, ": EECB"});
        if (seg_en[c*S + s] !== mc[c].seg_enabled(s, enable | se)) fail({what, ": segment enable"});
      end
    end
  endtask

  // One clock with the given controls; the models follow the same clock.
  task automatic clock(logic t_se, logic t_enable, logic [C-1:0] t_si);
    logic [F-1:0] mq;
    @(negedge clk);
    se = t_se; enable = t_enable; si = t_si;
    #1;
    compare("before edge");
    mq = model_q();
    for (int c = 0; c < C; c++) begin
      if (t_se) mc[c].shift(t_si[c]);
      else begin
        bit dv[];
        dv = new[clen[c]];
        for (int i = 0; i < clen[c]; i++) dv[i] = cut_fn(cstart[c] + i, mq);
        cap_toggles += mc[c].capture(t_enable, dv);
      end
    end
    @(posedge clk); #1;
    compare(t_se ? "shift" : "capture");
  endtask

  initial begin
    bit           pat[C][];
    logic [C-1:0] v;
    logic [F-1:0] prev_q;
    int           pos, seg;

    for (int c = 0; c < C; c++) begin
      cstart[c] = (c * F) / C;
      clen[c]   = ((c + 1) * F) / C - cstart[c];
      mc[c]     = new(clen[c], S);
    end
    maxlen = 0;
    for (int c = 0; c < C; c++) if (clen[c] > maxlen) maxlen = clen[c];
    K = maxlen + S;

    // Reset.
    rst = 1'b1; enable = 1'b0; se = 1'b0; si = '0;
    #2;
    compare("reset");
    n_reset++;
    @(negedge clk); rst = 1'b0;

    // Functional operation, EECBs at 0 after reset.
    repeat (3) begin clock(1'b0, 1'b1, '0); n_func_on++; end
    prev_q = q;
    repeat (2) begin clock(1'b0, 1'b0, '0); n_func_off++; end
    checks++;
    if (q !== prev_q) fail("functional hold changed flops");

    for (int p = 0; p <= NPAT; p++) begin
      // Build the pattern (cell order, position 0 next to scan in).
      for (int c = 0; c < C; c++) begin
        pat[c] = new[clen[c] + S];
        foreach (pat[c][k]) pat[c][k] = 1'($urandom);
        for (int s = 0; s < S; s++)
          pat[c][mc[c].eecb_pos[s]] = (p == 0) ? 1'b0 : (p == 1) ? 1'b1 : 1'($urandom);
      end
      // Shift in K clocks (the previous response comes out meanwhile).
      for (int k = 0; k < K; k++) begin
        for (int c = 0; c < C; c++) begin
          pos = K - 1 - k;
          v[c] = (pos < clen[c] + S) ? pat[c][pos] : 1'b0;
        end
        clock(1'b1, 1'b0, v);
        n_shift++;
      end
      if (p == NPAT) break;   // last pass only unloads
      // The pattern must now sit in the intended cells.
      for (int c = 0; c < C; c++) begin
        checks++;
        for (int i = 0; i < clen[c]; i++)
          if (q[cstart[c] + i] !== pat[c][mc[c].flop_pos[i]]) begin fail("loaded flop"); break; end
        for (int s = 0; s < S; s++)
          if (eecb[c*S + s] !== pat[c][mc[c].eecb_pos[s]]) fail("loaded EECB");
      end
      // Capture: one clock, or two for launch-off-capture on odd patterns.
      prev_q = q;
      for (int c = 0; c < C; c++)
        for (int s = 0; s < S; s++)
          if (eecb[c*S + s]) n_cap_on++; else n_cap_off++;
      clock(1'b0, 1'b0, '0);
      if (p % 2 == 1) begin clock(1'b0, 1'b0, '0); n_loc++; end
      else n_sa++;
      // Flops of denied segments must be unchanged.
      for (int c = 0; c < C; c++)
        for (int i = 0; i < clen[c]; i++) begin
          seg = mc[c].flop_seg[i];
          if (!eecb[c*S + seg] && q[cstart[c] + i] !== prev_q[cstart[c] + i]) fail("denied segment changed");
        end
      checks++;
    end

    checks++;
    if (n_reset == 0 || n_shift == 0 || n_cap_on == 0 || n_cap_off == 0 || n_loc == 0 ||
        n_sa == 0 || n_func_on == 0 || n_func_off == 0) fail("a mechanism never happened");
    checks++;
    if (n_shift != (NPAT + 1) * K) fail("shift cycle count");
    $display("top F=%0d C=%0d S=%0d: shift_clocks=%0d (%0d per load) seg_captures_enabled=%0d seg_captures_denied=%0d stuck_at=%0d loc_pairs=%0d func_load=%0d func_hold=%0d reset=%0d capture_toggles=%0d",
             F, C, S, n_shift, K, n_cap_on, n_cap_off, n_sa, n_loc, n_func_on, n_func_off, n_reset, cap_toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
