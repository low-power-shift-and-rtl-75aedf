// eecb_cell -- Embedded Enable Capture Bit.
//
// A MUX-D flip-flop placed in the scan path in front of a segment. Its multiplexer
// selects the scan input when SE = 1 and its own output when SE = 0, so it behaves as an
// ordinary shift-register stage while shifting and holds its value through every
// capture cycle (including both capture cycles of a launch-off-capture test). It has no
// enable pin. Its output goes three ways: back to its own mux, to the scan input of the
// first flop of its segment, and to the segment's OR gate that drives the flops' EN.
// A 1 lets the segment capture during test, a 0 denies capture.
//
// Interface: clk, rst (active high), si, se; output q.
// Timing: during shift, q equals si one clock earlier. An assertion checks that q never
// changes on a clock with se low.
// Structure follows the described cell. Asynchronous active-high reset to 0 (capture
// denied, global enable in control) is this design's choice.
module eecb_cell (
  input  logic clk,
  input  logic rst,
  input  logic si,
  input  logic se,
  output logic q
);

  logic mux_out;

  assign mux_out = se ? si : q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= mux_out;
  end

  // Rule of the scheme: outside shifting the EECB never changes, so one decision covers
  // every capture clock of a pattern. (A reset pulse between the two edges may clear it.)
  a_hold_in_capture: assert property (@(posedge clk) disable iff (rst)
                                      !se |=> (q == $past(q) || q == 1'b0))
    else $error("eecb_cell: EECB changed while SE was low");

endmodule
