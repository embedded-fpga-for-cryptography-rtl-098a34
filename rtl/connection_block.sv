// connection_block -- input connection block of one CLB.
//
// Each of the 24 CLB input pins has its own configurable multiplexer that can pick any of
// the CW wires (both directions) of one adjacent routing channel segment, so every input can
// reach every track of its channel. The six inputs of slice q are served by the channel on
// CLB side q (0: north, 1: east, 2: south, 3: west); that spreading of pins over the sides
// is this design's choice. Each pin uses sel_bits(CW) configuration bits, pin 0 in the low
// bits; select value 0 ties the pin to 0, value k picks wire k-1. Combinational.
module connection_block
  import efpga_pkg::*;
#(
  parameter int unsigned CW = 16
) (
  input  logic [3:0][CW-1:0]                    chan,   // adjacent segments, by side
  input  logic [CLB_INPUTS*sel_bits(CW)-1:0]    cfg,
  output logic [CLB_INPUTS-1:0]                 pin
);
  localparam int unsigned SW = sel_bits(CW);

  for (genvar p = 0; p < CLB_INPUTS; p++) begin : g_pin
    cfg_mux #(.N(CW), .SEL_W(SW)) u_mux (
      .in (chan[p / SLICE_INPUTS]),
      .sel(cfg[p*SW +: SW]),
      .out(pin[p])
    );
  end
endmodule
