// tb_scan_dff -- self-checking test of the enable MUX-D scan flip-flop.
//
// Drives random d, si, se and en for many clocks, with occasional asynchronous resets,
// and compares q after every edge with a reference value kept in the testbench:
// q follows (se ? si : d) only when en is 1 and is cleared by reset at once.
module tb_scan_dff;
  logic clk = 1'b0;
  logic rst, d, si, se, en, q;
  logic exp_q;
  int   checks = 0, failures = 0;
  int   n_hold = 0, n_scan = 0, n_func = 0;

  scan_dff dut (.clk(clk), .rst(rst), .d(d), .si(si), .se(se), .en(en), .q(q));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp_q);
    end
  endtask

  initial begin
    rst = 1'b1; d = 1'b1; si = 1'b1; se = 1'b0; en = 1'b0;
    #2; exp_q = 1'b0; check("reset");
    @(negedge clk); rst = 1'b0;
    @(posedge clk); #1; check("no load with en low");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      d = 1'($urandom); si = 1'($urandom); se = 1'($urandom); en = 1'($urandom);
      if (en && se)       begin exp_q = si; n_scan++; end
      else if (en)        begin exp_q = d;  n_func++; end
      else                n_hold++;
      @(posedge clk); #1; check("clocked");
      if ((i % 97) == 50) begin
        rst = 1'b1; en = 1'b0; #1; exp_q = 1'b0; check("async reset");
        @(negedge clk); rst = 1'b0;
      end
    end
    if (n_hold == 0 || n_scan == 0 || n_func == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
