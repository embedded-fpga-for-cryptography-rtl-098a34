// cfa_slice -- one cFA slice: a cFA cell plus a bypassable flip-flop on each output.
//
// The six slice inputs A..F go straight to the cFA cell. Each of the two cell outputs (S and
// Cout) is stored in its own flip-flop on every rising clock edge; a configuration bit per
// output selects whether the slice output is the registered value or the combinational cell
// output. Six configuration bits in all: four for the cell, two for the bypass multiplexers,
// as counted in the thesis.
// Timing: with the bypass bit set the output follows the inputs in the same cycle; with it
// clear the output is the cell value sampled at the previous rising edge.
// The synchronous active-low reset clearing the two flip-flops is this design's choice.
module cfa_slice
  import efpga_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [SLICE_INPUTS-1:0] in,     // {F,E,D,C,B,A}
  input  slice_cfg_t              cfg,
  output logic [SLICE_OUTPUTS-1:0] out    // {Cout, S}
);
  logic s_c, cout_c;
  logic s_q, cout_q;

  cfa_cell u_cell (
    .a(in[0]), .b(in[1]), .c(in[2]),
    .d(in[3]), .e(in[4]), .f(in[5]),
    .cfg(cfg.cfa),
    .s(s_c), .cout(cout_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q    <= 1'b0;
      cout_q <= 1'b0;
    end else begin
      s_q    <= s_c;
      cout_q <= cout_c;
    end
  end

  always_comb begin
    out[0] = cfg.bypass_s    ? s_c    : s_q;
    out[1] = cfg.bypass_cout ? cout_c : cout_q;
  end
endmodule
