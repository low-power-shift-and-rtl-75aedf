// tb_scan_segment -- self-checking test of one EECB-controlled scan segment.
//
// A 5-flop segment is driven with random scan enable, chain enable, scan input and
// functional inputs. After every clock q, so, eecb and seg_en are compared with the
// reference model. The test also counts captures with the EECB at 1, denied captures
// (EECB 0, segment frozen) and functional loads, and fails if one never happened.
module tb_scan_segment;
  import seg_chain_model_pkg::*;

  localparam int L = 5;

  logic         clk = 1'b0;
  logic         rst, se, en_or_se, si, so, eecb, seg_en;
  logic [L-1:0] d, q;
  int checks = 0, failures = 0;
  int n_shift = 0, n_cap_on = 0, n_cap_off = 0, n_func = 0;
  seg_chain_model m;
  bit dv[];

  scan_segment #(.SEG_LEN(L)) dut (
    .clk(clk), .rst(rst), .se(se), .en_or_se(en_or_se), .si(si),
    .d(d), .q(q), .so(so), .eecb(eecb), .seg_en(seg_en)
  );

  always #5 clk = ~clk;

  task automatic compare(string what);
    bit ok = 1'b1;
    for (int i = 0; i < L; i++) if (q[i] !== m.q(i)) ok = 1'b0;
    if (so !== m.so() || eecb !== m.eecb(0)) ok = 1'b0;
    if (seg_en !== m.seg_enabled(0, en_or_se)) ok = 1'b0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: q=%b eecb=%b so=%b seg_en=%b", what, $time, q, eecb, so, seg_en);
    end
  endtask

  initial begin
    m  = new(L, 1);
    dv = new[L];
    rst = 1'b1; se = 1'b0; en_or_se = 1'b0; si = 1'b0; d = '0;
    #2; compare("reset");
    @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // Long shift bursts so the EECB is refilled, then one or two capture clocks.
      se       = (i % 10) < 7;
      en_or_se = se | (($urandom % 4) == 0);
      si       = 1'($urandom);
      d        = L'($urandom);
      #1; compare("comb");   // seg_en before the edge
      foreach (dv[k]) dv[k] = d[k];
      if (se) begin m.shift(si); n_shift++; end
      else begin
        if (en_or_se)     n_func++;
        else if (m.eecb(0)) n_cap_on++;
        else              n_cap_off++;
        void'(m.capture(en_or_se, dv));
      end
      @(posedge clk); #1; compare(se ? "shift" : "capture");
    end
    checks++;
    if (n_shift == 0 || n_cap_on == 0 || n_cap_off == 0 || n_func == 0) begin
      failures++;
      $display("FAIL coverage: shift=%0d cap_on=%0d cap_off=%0d func=%0d", n_shift, n_cap_on, n_cap_off, n_func);
    end
    $display("segment: shift=%0d capture_enabled=%0d capture_denied=%0d functional=%0d",
             n_shift, n_cap_on, n_cap_off, n_func);
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
