// config_memory -- configuration memory holding the fabric's bitstream.
//
// The bitstream is loaded serially after power-up: while cfg_en is high, every rising clock
// edge shifts cfg_in into the top bit and moves every stored bit one place down, so after
// BITS cycles the bit shifted in first sits at index 0. cfg_out is the stored bit 0, which
// allows the memory to be chained or read back.
// The stored word drives every configurable element of the fabric in parallel, but only
// while the fabric may run: while the power-on reset por_n is low or a load is in progress
// (cfg_en high) the word presented to the fabric is all zeros, which switches every routing
// multiplexer off. Partially shifted bitstreams would otherwise set arbitrary routing,
// including rings of multiplexers that oscillate. por_n low also clears the memory on the
// next rising edge, like the power-up clear of a volatile configuration SRAM.
// Serial loading, the power-on clear and the output gating are this design's choices; the
// thesis only says the bitstream sits in volatile SRAM loaded at power-up.
module config_memory #(
  parameter int unsigned BITS = 64
) (
  input  logic            clk,
  input  logic            por_n,
  input  logic            cfg_en,
  input  logic            cfg_in,
  output logic            cfg_out,
  output logic [BITS-1:0] cfg
);
  logic [BITS-1:0] mem;

  always_ff @(posedge clk) begin
    if (!por_n)      mem <= '0;
    else if (cfg_en) mem <= BITS'({cfg_in, mem} >> 1);
  end

  assign cfg_out = mem[0];
  assign cfg     = (por_n && !cfg_en) ? mem : '0;
endmodule
