// cfa_cell -- configurable full adder (cFA), the logic element of the eFPGA.
//
// The cell has two independent 3-input parts, each set by two configuration bits f0 and f1.
// In each part f0 gates the first input with an AND and f1 forces the third input high with
// an OR, as drawn in the thesis' cFA figure.
//   Side 1 (sum part):   S    = (A & f0) ^ B ^ (C | f1)
//       f1 f0 = 00: B ^ C      01: A ^ B ^ C (full-adder sum)
//               10: ~B         11: ~(A ^ B)
//   Side 2 (carry part): d = D & f0, f = F | f1,  Cout = (d & E) ^ (d & f) ^ (E & f)
//       f1 f0 = 00: E & F      01: majority(D,E,F) (full-adder carry)
//               10: E          11: D | E
// That gives the eight functions the cell was designed around. The structure (gating gates,
// three pairwise AND gates and XOR gates) follows the thesis; the XOR of the three pairwise
// products equals their majority, which is what the carry part computes.
// Purely combinational; configuration comes from the cfa_cfg_t struct.
module cfa_cell
  import efpga_pkg::*;
(
  input  logic     a, b, c,      // side 1 inputs
  input  logic     d, e, f,      // side 2 inputs
  input  cfa_cfg_t cfg,
  output logic     s,
  output logic     cout
);
  logic a_g, c_g, d_g, f_g;

  always_comb begin
    a_g  = a & cfg.side1.f0;
    c_g  = c | cfg.side1.f1;
    s    = a_g ^ b ^ c_g;
    d_g  = d & cfg.side2.f0;
    f_g  = f | cfg.side2.f1;
    cout = (d_g & e) ^ (d_g & f_g) ^ (e & f_g);
  end
endmodule
