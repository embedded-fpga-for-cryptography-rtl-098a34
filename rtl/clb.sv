// clb -- configurable logic block: four cFA slices side by side.
//
// Slice q takes CLB inputs 6q..6q+5 as its A..F and drives CLB outputs 2q (S) and 2q+1
// (Cout). The CLB configuration word is the four 6-bit slice words, slice 0 in the low bits,
// 24 bits per CLB as in the thesis. The slices share no logic: a CLB is only the grouping
// that the routing sees (24 inputs, 8 outputs). Timing is that of cfa_slice.
module clb
  import efpga_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [CLB_INPUTS-1:0]   in,
  input  logic [CLB_CFG_BITS-1:0] cfg,
  output logic [CLB_OUTPUTS-1:0]  out
);
  for (genvar q = 0; q < CLB_SLICES; q++) begin : g_slice
    cfa_slice u_slice (
      .clk  (clk),
      .rst_n(rst_n),
      .in   (in[q*SLICE_INPUTS +: SLICE_INPUTS]),
      .cfg  (slice_cfg_t'(cfg[q*SLICE_CFG_BITS +: SLICE_CFG_BITS])),
      .out  (out[q*SLICE_OUTPUTS +: SLICE_OUTPUTS])
    );
  end
endmodule
