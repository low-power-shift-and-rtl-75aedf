// scan_dff -- MUX-D scan flip-flop with a load enable.
//
// A two-input multiplexer in front of a D flip-flop selects the functional input `d`
// (SE = 0) or the scan input `si` (SE = 1). The flop takes the selected value on the
// rising clock edge only while `en` is high; with `en` low it keeps its value, which is
// how a scan segment is denied capture. The enable is supplied from outside: in a plain
// chain it is (enable | SE), in a segmented chain it is (EECB | enable | SE).
//
// Interface: clk, rst (active high), d, si, se, en; output q, which also serves as the
// scan output to the next cell.
// Timing: q changes one clock after a sampled edge with en = 1.
// The mux, enable and reset pin follow the described scan cell. Reset being asynchronous,
// active high and clearing the flop to 0 is this design's choice.
module scan_dff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  input  logic si,
  input  logic se,
  input  logic en,
  output logic q
);

  logic mux_out;

  assign mux_out = se ? si : d;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= 1'b0;
    else if (en) q <= mux_out;
  end

endmodule
