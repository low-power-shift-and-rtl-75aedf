// segmented_scan_chain -- a scan chain split into EECB-controlled segments.
//
// CHAIN_LEN enable scan flops are split evenly into NUM_SEGS segments (segment s starts
// at flop floor(s*CHAIN_LEN/NUM_SEGS)); an EECB cell sits in front of each segment, so
// the chain is CHAIN_LEN+NUM_SEGS cells long from si to so. The first EECB takes the
// chain's scan input, every later EECB takes the scan output of the segment before it.
// One OR gate forms (enable | SE) for the whole chain; each segment ORs that with its own
// EECB to drive its flops' EN.
//
// Operation:
//   * Shift (se = 1): all cells, EECBs included, shift one place per clock. Loading a
//     pattern takes CHAIN_LEN+NUM_SEGS clocks; the EECB values are simply bits of the
//     pattern, so test generation sets them like any other scan cell.
//   * Capture (se = 0, enable = 0): segments whose EECB holds 1 load d[], the others
//     keep their contents; the EECBs keep theirs.
//   * Functional (se = 0, EECBs at 0): enable = 1 loads every flop, enable = 0 freezes
//     all of them.
//
// Interface: clk, rst (active high), enable (global functional enable), se, si; d[] and
// q[] hold the flops in scan order (index 0 nearest si); so; eecb[] (EECB values) and
// seg_en[] (per-segment EN), both indexed by segment.
// Defaults are one chain of the largest benchmark in its 1/6-chain configuration
// (1073 flops, 6 segments). The even split, with the longer segments at the end as in the
// 2+3 example, is this design's choice of how to split "evenly".
module segmented_scan_chain
  import scan_seg_pkg::*;
#(
  parameter int unsigned CHAIN_LEN = 1073,
  parameter int unsigned NUM_SEGS  = 6
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  input  logic                 se,
  input  logic                 si,
  input  logic [CHAIN_LEN-1:0] d,
  output logic [CHAIN_LEN-1:0] q,
  output logic                 so,
  output logic [NUM_SEGS-1:0]  eecb,
  output logic [NUM_SEGS-1:0]  seg_en
);

  logic                en_or_se;   // global enable OR scan enable
  logic [NUM_SEGS-1:0] seg_si;     // scan input of each segment (its EECB)
  logic [NUM_SEGS-1:0] seg_so;     // scan output of each segment

  assign en_or_se = enable | se;

  for (genvar s = 0; s < NUM_SEGS; s++) begin : g_seg
    localparam int unsigned START = part_start(s, CHAIN_LEN, NUM_SEGS);
    localparam int unsigned LEN   = part_len(s, CHAIN_LEN, NUM_SEGS);

    if (s == 0) begin : g_head
      assign seg_si[s] = si;
    end else begin : g_link
      assign seg_si[s] = seg_so[s-1];
    end

    scan_segment #(
      .SEG_LEN (LEN)
    ) u_seg (
      .clk      (clk),
      .rst      (rst),
      .se       (se),
      .en_or_se (en_or_se),
      .si       (seg_si[s]),
      .d        (d[START +: LEN]),
      .q        (q[START +: LEN]),
      .so       (seg_so[s]),
      .eecb     (eecb[s]),
      .seg_en   (seg_en[s])
    );
  end

  assign so = seg_so[NUM_SEGS-1];

  initial begin
    assert (NUM_SEGS >= 1 && CHAIN_LEN >= NUM_SEGS)
      else $error("segmented_scan_chain: need 1 <= NUM_SEGS <= CHAIN_LEN");
  end

endmodule
