// eecb_scan_top -- scan architecture of a design with EECB-segmented scan chains.
//
// NUM_FLOPS scan flops are split into NUM_CHAINS balanced chains (chain c holds flops
// floor(c*NUM_FLOPS/NUM_CHAINS) up to the next chain's first flop), and every chain is
// split into NUM_SEGS segments, each headed by an Embedded Enable Capture Bit (EECB).
// The functional logic of the design is not part of this module: d[] are the values it
// presents to the scan flops, q[] the flop outputs it reads. Likewise the scan inputs
// si[] and outputs so[] of the chains are where a test-data decompressor and response
// compactor, or the tester, connect.
//
// A test pattern is loaded with se = 1 for (longest chain + NUM_SEGS) clocks; the bits
// that land in the EECBs decide which segments capture. With se = 0 and enable = 0, one
// clock (stuck-at) or two clocks (launch-off-capture) capture into the enabled segments
// only; denied segments keep the shifted-in values, which saves capture switching and
// shifts the same low-toggle data back out. In functional use the EECBs are held at 0
// (reset does that) and enable alone gates all flops.
//
// Interface: clk, rst (active high, asynchronous), enable, se, si[c], so[c], d[] and q[]
// (flat flop index), eecb[] and seg_en[] (index c*NUM_SEGS + s).
// Defaults: the largest benchmark quoted, 5364 scan flops in 5 chains of 1072-1073,
// each chain cut into 6 segments (the 1/6-chain configuration).
module eecb_scan_top
  import scan_seg_pkg::*;
#(
  parameter int unsigned NUM_FLOPS  = 5364,
  parameter int unsigned NUM_CHAINS = 5,
  parameter int unsigned NUM_SEGS   = 6
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           enable,
  input  logic                           se,
  input  logic [NUM_CHAINS-1:0]          si,
  output logic [NUM_CHAINS-1:0]          so,
  input  logic [NUM_FLOPS-1:0]           d,
  output logic [NUM_FLOPS-1:0]           q,
  output logic [NUM_CHAINS*NUM_SEGS-1:0] eecb,
  output logic [NUM_CHAINS*NUM_SEGS-1:0] seg_en
);

  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    localparam int unsigned START = part_start(c, NUM_FLOPS, NUM_CHAINS);
    localparam int unsigned LEN   = part_len(c, NUM_FLOPS, NUM_CHAINS);

    segmented_scan_chain #(
      .CHAIN_LEN (LEN),
      .NUM_SEGS  (NUM_SEGS)
    ) u_chain (
      .clk    (clk),
      .rst    (rst),
      .enable (enable),
      .se     (se),
      .si     (si[c]),
      .d      (d[START +: LEN]),
      .q      (q[START +: LEN]),
      .so     (so[c]),
      .eecb   (eecb[c*NUM_SEGS +: NUM_SEGS]),
      .seg_en (seg_en[c*NUM_SEGS +: NUM_SEGS])
    );
  end

endmodule
