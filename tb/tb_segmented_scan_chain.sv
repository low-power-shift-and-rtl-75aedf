// tb_segmented_scan_chain -- self-checking test of the EECB-segmented scan chain.
//
// Part 1 uses the five-flop, two-segment example chain (segments of 2 and 3 flops). For
// each of the four EECB settings it loads a pattern in exactly 5 + 2 = 7 shift clocks,
// checks where every bit landed, applies two capture clocks (a launch-off-capture pair)
// and checks that only segments whose EECB is 1 took the functional inputs, both times,
// then unloads the chain and checks the 7 bits that come out. Functional mode (EECBs 0,
// global enable 1 or 0) is checked as well. Expected values are written out by hand from
// the chain's cell order: EECB0, SDFF0, SDFF1, EECB1, SDFF2, SDFF3, SDFF4.
// Part 2 drives a 23-flop, 4-segment chain with random operations and compares it
// every clock with the reference model.
module tb_segmented_scan_chain;
  import seg_chain_model_pkg::*;

  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;
  int n_cap_on = 0, n_cap_off = 0, n_loc = 0, n_func_on = 0, n_func_off = 0;

  always #5 clk = ~clk;

  task automatic expect_bits(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- part 1: example chain
  logic       a_enable, a_se, a_si, a_so;
  logic [4:0] a_d, a_q;
  logic [1:0] a_eecb, a_seg_en;

  segmented_scan_chain #(.CHAIN_LEN(5), .NUM_SEGS(2)) dut_a (
    .clk(clk), .rst(rst), .enable(a_enable), .se(a_se), .si(a_si), .d(a_d), .q(a_q),
    .so(a_so), .eecb(a_eecb), .seg_en(a_seg_en)
  );

  // Cell order from scan in to scan out: EECB0, SDFF0, SDFF1, EECB1, SDFF2, SDFF3, SDFF4.
  // A load vector lists the cells in that order; the bit for SDFF4 is shifted in first.
  task automatic load_a(logic [6:0] cells);
    for (int k = 0; k < 7; k++) begin
      @(negedge clk); a_se = 1'b1; a_si = cells[k];
      #1;
      checks++;
      if (a_seg_en !== 2'b11) begin failures++; $display("FAIL seg_en not forced by SE"); end
      @(posedge clk);
    end
    @(negedge clk); a_se = 1'b0;
    #1;
  endtask

  task automatic part1();
    logic [4:0] pat, held, d1, d2, exp;
    logic [6:0] cells, out;
    logic       e0, e1;
    for (int combo = 0; combo < 4; combo++) begin
      e0 = combo[0];
      e1 = combo[1];
      pat   = 5'($urandom);
      cells = {e0, pat[0], pat[1], e1, pat[2], pat[3], pat[4]};
      a_enable = 1'b0;
      load_a(cells);
      expect_bits(32'(a_q), 32'(pat), "flops after 7 shifts");
      expect_bits(32'(a_eecb), 32'({e1, e0}), "EECBs after 7 shifts");
      expect_bits(32'(a_seg_en), 32'({e1, e0}), "segment enables in capture");
      // Launch-off-capture: two capture clocks.
      held = pat;
      d1 = 5'($urandom);
      a_d = d1;
      @(posedge clk); #1;
      exp = {e1 ? d1[4:2] : held[4:2], e0 ? d1[1:0] : held[1:0]};
      expect_bits(32'(a_q), 32'(exp), "first capture");
      held = exp;
      @(negedge clk);
      d2 = ~d1;
      a_d = d2;
      @(posedge clk); #1;
      exp = {e1 ? d2[4:2] : held[4:2], e0 ? d2[1:0] : held[1:0]};
      expect_bits(32'(a_q), 32'(exp), "second capture");
      expect_bits(32'(a_eecb), 32'({e1, e0}), "EECBs hold over both captures");
      n_loc++;
      if (e0) n_cap_on++; else n_cap_off++;
      if (e1) n_cap_on++; else n_cap_off++;
      // Unload: seven shift clocks bring the cells out, SDFF4 first.
      for (int k = 0; k < 7; k++) begin
        @(negedge clk); a_se = 1'b1; a_si = 1'b0;
        out[k] = a_so;
        @(posedge clk);
      end
      @(negedge clk); a_se = 1'b0;
      expect_bits(32'(out), 32'({e0, exp[0], exp[1], e1, exp[2], exp[3], exp[4]}),
                  "unloaded cells");
    end
    // Functional mode: EECBs at 0, global enable decides.
    load_a(7'b0_10_0_101);
    a_enable = 1'b1; a_d = 5'b01101;
    @(posedge clk); #1;
    expect_bits(32'(a_q), 32'(5'b01101), "functional load with enable 1");
    n_func_on++;
    @(negedge clk); a_enable = 1'b0; a_d = 5'b10010;
    @(posedge clk); #1;
    expect_bits(32'(a_q), 32'(5'b01101), "functional hold with enable 0");
    n_func_off++;
    @(negedge clk);
  endtask

  // ---------------------------------------------------------------- part 2: random chain
  localparam int BL = 23, BS = 4;
  logic          b_enable, b_se, b_si, b_so;
  logic [BL-1:0] b_d, b_q;
  logic [BS-1:0] b_eecb, b_seg_en;
  seg_chain_model mb;

  segmented_scan_chain #(.CHAIN_LEN(BL), .NUM_SEGS(BS)) dut_b (
    .clk(clk), .rst(rst), .enable(b_enable), .se(b_se), .si(b_si), .d(b_d), .q(b_q),
    .so(b_so), .eecb(b_eecb), .seg_en(b_seg_en)
  );

  task automatic compare_b(string what);
    bit ok = 1'b1;
    for (int i = 0; i < BL; i++) if (b_q[i] !== mb.q(i)) ok = 1'b0;
    for (int s = 0; s < BS; s++) begin
      if (b_eecb[s] !== mb.eecb(s)) ok = 1'b0;
      if (b_seg_en[s] !== mb.seg_enabled(s, b_enable | b_se)) ok = 1'b0;
    end
    if (b_so !== mb.so()) ok = 1'b0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: q=%b eecb=%b", what, $time, b_q, b_eecb);
    end
  endtask

  task automatic part2();
    bit dv[] = new[BL];
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      b_se     = (i % 40) < 30;
      b_enable = ($urandom % 8) == 0;
      b_si     = 1'($urandom);
      b_d      = BL'($urandom);
      #1; compare_b("before edge");
      foreach (dv[k]) dv[k] = b_d[k];
      if (b_se) mb.shift(b_si);
      else void'(mb.capture(b_enable, dv));
      @(posedge clk); #1; compare_b(b_se ? "shift" : "capture");
    end
  endtask

  initial begin
    mb = new(BL, BS);
    rst = 1'b1;
    a_enable = 1'b0; a_se = 1'b0; a_si = 1'b0; a_d = '0;
    b_enable = 1'b0; b_se = 1'b0; b_si = 1'b0; b_d = '0;
    #2;
    expect_bits(32'(a_q), 0, "reset flops");
    expect_bits(32'(a_eecb), 0, "reset EECBs");
    @(negedge clk); rst = 1'b0;
    part1();
    part2();
    checks++;
    if (n_cap_on == 0 || n_cap_off == 0 || n_loc == 0 || n_func_on == 0 || n_func_off == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("chain: captures_enabled=%0d captures_denied=%0d loc_pairs=%0d func_load=%0d func_hold=%0d",
             n_cap_on, n_cap_off, n_loc, n_func_on, n_func_off);
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
