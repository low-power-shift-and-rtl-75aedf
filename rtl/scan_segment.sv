// scan_segment -- one EECB-controlled scan segment.
//
// The segment is an EECB cell followed by SEG_LEN enable scan flops, in scan order:
// si -> EECB -> flop 0 -> flop 1 -> ... -> flop SEG_LEN-1 -> so. A two-input OR gate
// combines the EECB output with the chain-wide (enable | SE) signal and drives the EN pin
// of every flop in the segment:
//   * SE = 1: EN is 1, the segment is a plain shift register of SEG_LEN+1 cells.
//   * SE = 0, enable = 0 (test capture): EN equals the EECB, so the segment captures
//     d[] when its EECB holds 1 and keeps its shifted-in values when it holds 0.
//   * SE = 0 during functional use: the EECBs are kept at 0 and the global enable alone
//     decides whether the flops load.
// The EECB holds whenever SE = 0, so the same decision applies to both capture cycles
// of a launch-off-capture test.
//
// Interface: clk, rst (active high), se, en_or_se (the chain's enable | SE), si, d[] and
// q[] (index 0 is the flop nearest the EECB), so (scan out of the last flop), eecb
// (EECB value) and seg_en (the OR gate output, EN of the segment's flops).
// Timing: all outputs are registered except seg_en, which is combinational. An assertion
// checks that the flops never change on a clock with seg_en low.
// The structure follows the described segment; SEG_LEN's default of 179 is the segment
// length of the largest benchmark split into sixths (1073/6, quoted as 180).
module scan_segment #(
  parameter int unsigned SEG_LEN = 179
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               se,
  input  logic               en_or_se,
  input  logic               si,
  input  logic [SEG_LEN-1:0] d,
  output logic [SEG_LEN-1:0] q,
  output logic               so,
  output logic               eecb,
  output logic               seg_en
);

  logic [SEG_LEN-1:0] scan_in;  // scan input of each flop

  eecb_cell u_eecb (
    .clk (clk),
    .rst (rst),
    .si  (si),
    .se  (se),
    .q   (eecb)
  );

  assign seg_en = eecb | en_or_se;

  for (genvar i = 0; i < SEG_LEN; i++) begin : g_ff
    // Scan path: the EECB feeds the first flop, every flop feeds the next one.
    if (i == 0) begin : g_first
      assign scan_in[i] = eecb;
    end else begin : g_next
      assign scan_in[i] = q[i-1];
    end

    scan_dff u_ff (
      .clk (clk),
      .rst (rst),
      .d   (d[i]),
      .si  (scan_in[i]),
      .se  (se),
      .en  (seg_en),
      .q   (q[i])
    );
  end

  assign so = q[SEG_LEN-1];

  // A segment whose EECB denies capture keeps every flop unchanged. (A reset pulse
  // between the two edges may clear it.)
  a_denied_holds: assert property (@(posedge clk) disable iff (rst)
                                   !seg_en |=> (q == $past(q) || q == '0))
    else $error("scan_segment: denied segment changed");

endmodule
