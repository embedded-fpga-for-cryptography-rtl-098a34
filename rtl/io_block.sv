// io_block -- one IO site on the fabric perimeter.
//
// Output direction: a configurable multiplexer picks one of the CW wires of the adjacent
// perimeter channel segment and drives the output pad (select 0 drives 0). Input direction:
// the input pad is buffered into the fabric, where the neighbouring switch block offers it to
// its wire-driving multiplexers. One input and one output pad per site is this design's
// choice; the thesis only shows IO sites around the CLB array. Combinational.
module io_block
  import efpga_pkg::*;
#(
  parameter int unsigned CW = 16
) (
  input  logic [CW-1:0]              chan,
  input  logic [io_cfg_bits(CW)-1:0] cfg,
  input  logic                       pad_in,
  output logic                       pad_out,
  output logic                       fabric_in
);
  cfg_mux #(.N(CW), .SEL_W(io_cfg_bits(CW))) u_mux (
    .in (chan),
    .sel(cfg),
    .out(pad_out)
  );

  assign fabric_in = pad_in;
endmodule
