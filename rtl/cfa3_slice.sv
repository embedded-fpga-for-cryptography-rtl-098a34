// cfa3_slice -- merged cFA slice with three inputs and one output.
//
// The two parts of a cFA cell share the same three inputs (A feeds A and D, B feeds B and E,
// C feeds C and F); a configurable 2:1 multiplexer picks the side 1 or the side 2 result, and
// that result goes to the slice output either directly or through a flip-flop (bypass bit).
// This is the variant the thesis built to measure how much routing the unused half of a cFA
// costs: it keeps the cell's eight functions but needs only three routed inputs and one
// output. Configuration: 4 cFA bits, 1 output-select bit (1 = side 2), 1 bypass bit (1 =
// combinational). Timing as cfa_slice; the synchronous flip-flop reset is this design's choice.
module cfa3_slice
  import efpga_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic [2:0] in,        // {C, B, A}
  input  cfa_cfg_t cfa_cfg,
  input  logic     sel_side2,
  input  logic     bypass,
  output logic     out
);
  logic s, cout, y, y_q;

  cfa_cell u_cell (
    .a(in[0]), .b(in[1]), .c(in[2]),
    .d(in[0]), .e(in[1]), .f(in[2]),
    .cfg(cfa_cfg),
    .s(s), .cout(cout)
  );

  assign y = sel_side2 ? cout : s;

  always_ff @(posedge clk) begin
    if (!rst_n) y_q <= 1'b0;
    else        y_q <= y;
  end

  assign out = bypass ? y : y_q;
endmodule
