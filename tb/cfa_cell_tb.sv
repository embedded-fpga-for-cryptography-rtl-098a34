// cfa_cell_tb -- exhaustive check of the cFA cell.
//
// For all four settings of each part and all eight input patterns, the outputs are compared
// with the function the mode names (XOR2, XOR3, NOT, XNOR; AND, majority, buffer, OR),
// written here as truth-table expressions independent of the cell's gate structure.
module cfa_cell_tb;
  import efpga_pkg::*;

  logic a, b, c, d, e, f, s, cout;
  cfa_cfg_t cfg;
  int checks = 0, failures = 0;

  cfa_cell dut (.a, .b, .c, .d, .e, .f, .cfg, .s, .cout);

  function automatic logic exp_s(input logic [1:0] m, input logic a_, b_, c_);
    case (m)   // {f1, f0}
      2'b00:   return b_ ^ c_;
      2'b01:   return a_ ^ b_ ^ c_;
      2'b10:   return !b_;
      default: return !(a_ ^ b_);
    endcase
  endfunction

  function automatic logic exp_cout(input logic [1:0] m, input logic d_, e_, f_);
    case (m)
      2'b00:   return e_ && f_;
      2'b01:   return (d_ + e_ + f_) >= 2;
      2'b10:   return e_;
      default: return d_ || e_;
    endcase
  endfunction

  initial begin
    for (int m1 = 0; m1 < 4; m1++)
      for (int m2 = 0; m2 < 4; m2++)
        for (int v = 0; v < 64; v++) begin
          cfg.side1 = cfa_part_cfg_t'(m1[1:0]);
          cfg.side2 = cfa_part_cfg_t'(m2[1:0]);
          {f, e, d, c, b, a} = v[5:0];
          #1;
          checks += 2;
          if (s !== exp_s(m1[1:0], a, b, c)) begin
            failures++;
            $display("FAIL S mode=%0d abc=%b%b%b s=%b", m1, a, b, c, s);
          end
          if (cout !== exp_cout(m2[1:0], d, e, f)) begin
            failures++;
            $display("FAIL Cout mode=%0d def=%b%b%b cout=%b", m2, d, e, f, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
