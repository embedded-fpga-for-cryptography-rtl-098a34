// newcell_slice -- the two-sided configurable cell proposed as an improvement on the cFA.
//
// Both sides compute AND, OR and XOR of their two inputs and pick one of four functions with
// a 4:1 multiplexer; the picked value can be inverted, and each side's result reaches its
// output directly or through a flip-flop. Side 1 offers A1 itself as the fourth function
// (buffer, or inverter with the inversion bit), which also lets flip-flops be chained. Side
// 2 offers instead a 2:1 multiplexer between A2 and B2 whose select is B1, the input of the
// other side. Functions per side: {NOT,} AND, NAND, OR, NOR, XOR, XNOR, and buffer/inverter
// (side 1) or mux/inverted mux (side 2).
// Configuration per side: fn (2 bits: 0 OR, 1 AND, 2 XOR, 3 A1 on side 1 / mux on side 2),
// inv (1 bit), bypass (1 bit, 1 = combinational): 8 bits per slice. Gates, multiplexers,
// inverter and flip-flops follow the thesis' drawing of the cell.
// Which mux input B1 = 0 selects (A2 here) and the bit encodings are this design's choices.
// The synchronous active-low flip-flop reset is also this design's choice.
module newcell_slice (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a1, b1, a2, b2,
  input  logic [1:0] fn1, fn2,
  input  logic       inv1, inv2,
  input  logic       bypass1, bypass2,
  output logic       out1, out2
);
  logic g1, g2, y1, y2, q1, q2;

  always_comb begin
    case (fn1)
      2'd0:    g1 = a1 | b1;
      2'd1:    g1 = a1 & b1;
      2'd2:    g1 = a1 ^ b1;
      default: g1 = a1;
    endcase
    case (fn2)
      2'd0:    g2 = a2 | b2;
      2'd1:    g2 = a2 & b2;
      2'd2:    g2 = a2 ^ b2;
      default: g2 = b1 ? b2 : a2;
    endcase
    y1 = g1 ^ inv1;
    y2 = g2 ^ inv2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      q1 <= y1;
      q2 <= y2;
    end
  end

  assign out1 = bypass1 ? y1 : q1;
  assign out2 = bypass2 ? y2 : q2;
endmodule
