// tb_eecb_cell -- self-checking test of the Embedded Enable Capture Bit cell.
//
// Random si and se over many clocks: with se = 1 the cell must take si, with se = 0 it
// must hold whatever it had, however long capture lasts. Asynchronous reset must clear
// it to 0 at once.
module tb_eecb_cell;
  logic clk = 1'b0;
  logic rst, si, se, q;
  logic exp_q;
  int   checks = 0, failures = 0;
  int   n_hold = 0, n_shift = 0;

  eecb_cell dut (.clk(clk), .rst(rst), .si(si), .se(se), .q(q));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp_q);
    end
  endtask

  initial begin
    rst = 1'b1; si = 1'b1; se = 1'b1;
    #2; exp_q = 1'b0; check("reset");
    @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      si = 1'($urandom);
      se = ($urandom % 3) != 0;
      if (se) begin exp_q = si; n_shift++; end
      else    n_hold++;
      @(posedge clk); #1; check(se ? "shift" : "hold");
      if ((i % 101) == 60) begin
        rst = 1'b1; se = 1'b0; #1; exp_q = 1'b0; check("async reset");
        @(negedge clk); rst = 1'b0;
      end
    end
    if (n_hold == 0 || n_shift == 0) failures++;
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
