// tb_workloads -- the twelve benchmark configurations of the evaluation.
//
// Four circuits, each with its scan flops in 5 balanced chains (312, 509, 879 and 5364
// flops), each cut three ways: a quarter, a third and half a chain per segment for the
// three smaller circuits, 1/36, 1/12 and 1/6 of a chain for the largest. Every
// configuration gets one workload_runner, which checks loading, selective capture and
// segment length against the quoted value. The capture switching of the selective
// pattern and of the all-enabled pattern is printed per configuration; those numbers come
// from a random stand-in for the functional logic and random patterns, not from the real
// circuits or real test patterns.
module tb_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 12;
  localparam int FL[N]   = '{312, 312, 312, 509, 509, 509, 879, 879, 879, 5364, 5364, 5364};
  localparam int SG[N]   = '{4, 3, 2, 4, 3, 2, 4, 3, 2, 36, 12, 6};
  localparam int LQ[N]   = '{16, 21, 32, 26, 34, 51, 44, 60, 90, 30, 90, 180};

  logic [N-1:0] done;
  int chk[N], fl[N], ts[N], ta[N];
  int checks = 0, failures = 0;

  for (genvar w = 0; w < N; w++) begin : g_wl
    workload_runner #(
      .NUM_FLOPS(FL[w]), .NUM_CHAINS(5), .NUM_SEGS(SG[w]), .SEG_LEN_QUOTED(LQ[w]), .SEED(w + 1)
    ) u_run (
      .clk(clk), .done(done[w]), .checks(chk[w]), .failures(fl[w]),
      .toggles_selective(ts[w]), .toggles_all(ta[w])
    );
  end

  initial begin
    wait (&done);
    for (int w = 0; w < N; w++) begin
      checks   += chk[w];
      failures += fl[w];
      $display("flops=%0d segs/chain=%0d quoted L_seg=%0d: capture toggles selective=%0d all-enabled=%0d",
               FL[w], SG[w], LQ[w], ts[w], ta[w]);
    end
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
