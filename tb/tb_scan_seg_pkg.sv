// tb_scan_seg_pkg -- checks the chain and segment partitioning functions.
//
// Expected values are the balanced chain lengths of the four benchmark circuits
// (312, 509, 879 and 5364 scan flops in 5 chains give 62-63, 101-102, 175-176 and
// 1072-1073), the 2 + 3 split of the five-flop example chain, and its 5 + 2 = 7 shift
// cycles. Every split is also checked to cover its total exactly, without gaps.
module tb_scan_seg_pkg;
  import scan_seg_pkg::*;
  int checks = 0, failures = 0;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_split(int total, int parts, int lo, int hi, string what);
    int sum = 0;
    for (int i = 0; i < parts; i++) begin
      int l = part_len(i, total, parts);
      checks++;
      if (l < lo || l > hi) begin
        failures++;
        $display("FAIL %s part %0d: length %0d not in %0d..%0d", what, i, l, lo, hi);
      end
      expect_eq(part_start(i, total, parts), sum, {what, " contiguous"});
      sum += l;
    end
    expect_eq(sum, total, {what, " total"});
  endtask

  initial begin
    check_split(312,  5, 62,   63,   "des56 chains");
    check_split(509,  5, 101,  102,  "fm_receiver chains");
    check_split(879,  5, 175,  176,  "colorconv chains");
    check_split(5364, 5, 1072, 1073, "fpu_double chains");
    expect_eq(part_len(0, 5, 2), 2, "example segment 1");
    expect_eq(part_len(1, 5, 2), 3, "example segment 2");
    expect_eq(part_start(1, 5, 2), 2, "example segment 2 start");
    expect_eq(shift_cycles(5, 2), 7, "example shift cycles");
    expect_eq(shift_cycles(1073, 6), 1079, "fpu_double 1/6 shift cycles");
    check_split(1073, 6, 178, 179, "fpu_double 1/6 segments");
    check_split(1073, 36, 29, 30, "fpu_double 1/36 segments");
    check_split(63, 4, 15, 16, "des56 1/4 segments");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
