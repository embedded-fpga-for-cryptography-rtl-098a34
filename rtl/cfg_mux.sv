// cfg_mux -- configurable routing multiplexer used throughout the fabric.
//
// Selects one of N inputs under a SEL_W-bit configuration value: 0 drives 0 (an unused wire
// or pin), k in 1..N passes input k-1, values above N also drive 0. Combinational.
module cfg_mux #(
  parameter int unsigned N     = 4,
  parameter int unsigned SEL_W = $clog2(N + 1)
) (
  input  logic [N-1:0]     in,
  input  logic [SEL_W-1:0] sel,
  output logic             out
);
  always_comb begin
    out = 1'b0;
    for (int unsigned k = 0; k < N; k++)
      if (SEL_W'(k + 1) == sel) out = in[k];
  end
endmodule
