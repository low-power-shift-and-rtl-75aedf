// workload_runner -- runs one benchmark configuration through the segmented scan top.
//
// Instantiates eecb_scan_top with NUM_FLOPS scan flops in NUM_CHAINS chains of NUM_SEGS
// segments and applies two captures with identical flop contents: first with random EECB
// bits (the kind of selective enabling test generation produces), then with every EECB at
// 1 (every segment captures, as in an unsegmented chain). The stand-in functional logic is
// d[i] = q[i] ^ q[i+1] ^ q[i+7], so both captures see the same d[]. It checks, against
// values computed here: the load length (longest chain + NUM_SEGS clocks), where each
// loaded bit lands, that denied segments do not change, that enabled segments take d[],
// and that the selective capture toggles no more flops than the all-enabled one. It also
// checks the mean segment length against the quoted segment length SEG_LEN_QUOTED
// (within 2 flops). Results come out on checks/failures/toggle ports when done is set.
module workload_runner #(
  parameter int NUM_FLOPS      = 312,
  parameter int NUM_CHAINS     = 5,
  parameter int NUM_SEGS       = 4,
  parameter int SEG_LEN_QUOTED = 16,
  parameter int SEED           = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   toggles_selective,
  output int   toggles_all
);
  localparam int F = NUM_FLOPS, C = NUM_CHAINS, S = NUM_SEGS;

  logic           rst, enable, se;
  logic [C-1:0]   si, so;
  logic [F-1:0]   d, q;
  logic [C*S-1:0] eecb, seg_en;

  eecb_scan_top #(.NUM_FLOPS(F), .NUM_CHAINS(C), .NUM_SEGS(S)) dut (
    .clk(clk), .rst(rst), .enable(enable), .se(se), .si(si), .so(so),
    .d(d), .q(q), .eecb(eecb), .seg_en(seg_en)
  );

  always_comb begin
    for (int i = 0; i < F; i++) d[i] = q[i] ^ q[(i + 1) % F] ^ q[(i + 7) % F];
  end

  int cstart[C], clen[C];
  int maxlen, K;

  // Scan position (0 next to scan in) of flop i of a chain, and of EECB s.
  function automatic int seg_of(int i, int len);
    for (int s = 0; s < S; s++) if (i < ((s + 1) * len) / S) return s;
    return S - 1;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL F=%0d S=%0d: %s", F, S, msg);
  endtask

  // Shift in `flops` (flat index) with EECB bits `eb` in exactly K clocks.
  task automatic load(logic [F-1:0] flops, logic [C*S-1:0] eb);
    bit cells[C][];
    for (int c = 0; c < C; c++) begin
      cells[c] = new[clen[c] + S];
      for (int i = 0; i < clen[c]; i++) cells[c][i + seg_of(i, clen[c]) + 1] = flops[cstart[c] + i];
      for (int s = 0; s < S; s++) cells[c][(s * clen[c]) / S + s] = eb[c*S + s];
    end
    for (int k = 0; k < K; k++) begin
      @(negedge clk);
      se = 1'b1;
      for (int c = 0; c < C; c++) si[c] = (K - 1 - k < clen[c] + S) ? cells[c][K - 1 - k] : 1'b0;
      @(posedge clk);
    end
    @(negedge clk);
    se = 1'b0; si = '0;
    #1;
    checks++;
    if (q !== flops) fail("loaded flops");
    checks++;
    if (eecb !== eb) fail("loaded EECBs");
  endtask

  // One capture clock; returns the number of flops that changed.
  task automatic capture(logic [C*S-1:0] eb, output int toggles);
    logic [F-1:0] q0, d0, expq;
    q0 = q; d0 = d;
    for (int c = 0; c < C; c++)
      for (int i = 0; i < clen[c]; i++)
        expq[cstart[c] + i] = eb[c*S + seg_of(i, clen[c])] ? d0[cstart[c] + i] : q0[cstart[c] + i];
    @(posedge clk); #1;
    checks++;
    if (q !== expq) fail("capture result");
    toggles = $countones(q ^ q0);
  endtask

  initial begin
    logic [F-1:0]   pat;
    logic [C*S-1:0] eb;
    int             sum_len;
    void'($urandom(SEED));
    done = 1'b0; checks = 0; failures = 0; toggles_selective = 0; toggles_all = 0;
    for (int c = 0; c < C; c++) begin
      cstart[c] = (c * F) / C;
      clen[c]   = ((c + 1) * F) / C - cstart[c];
    end
    maxlen = 0;
    for (int c = 0; c < C; c++) if (clen[c] > maxlen) maxlen = clen[c];
    K = maxlen + S;
    // Mean segment length of the longest chain against the quoted length.
    checks++;
    if ((maxlen + S / 2) / S > SEG_LEN_QUOTED + 2 || (maxlen + S / 2) / S < SEG_LEN_QUOTED - 2)
      fail($sformatf("mean segment length %0d far from quoted %0d", (maxlen + S / 2) / S, SEG_LEN_QUOTED));
    sum_len = 0;
    for (int c = 0; c < C; c++) sum_len += clen[c];
    checks++;
    if (sum_len != F) fail("chains do not cover all flops");

    rst = 1'b1; enable = 1'b0; se = 1'b0; si = '0;
    #2 rst = 1'b0;
    for (int w = 0; w < F; w += 32) pat[w +: 32] = $urandom;
    for (int w = 0; w < C * S; w++) eb[w] = 1'($urandom);
    eb[0] = 1'b0;   // at least one denied and one enabled segment
    eb[1] = 1'b1;
    load(pat, eb);
    capture(eb, toggles_selective);
    load(pat, '1);
    capture('1, toggles_all);
    checks++;
    if (toggles_selective > toggles_all) fail("selective capture toggled more flops");
    done = 1'b1;
  end
endmodule
