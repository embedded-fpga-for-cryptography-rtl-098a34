// clb_tb -- checks that the four slices of a CLB work independently on their own pins.
//
// Each slice gets a different cFA mode pair and bypass setting; random 24-bit input words
// are applied and every output bit is compared with a reference computed here from the
// slice's pin numbers (6q..6q+5 in, 2q and 2q+1 out). Registered outputs are checked one
// cycle after their inputs.
module clb_tb;
  import efpga_pkg::*;

  logic clk = 0, rst_n;
  logic [CLB_INPUTS-1:0] in, in_prev;
  logic [CLB_CFG_BITS-1:0] cfg;
  logic [CLB_OUTPUTS-1:0] out;
  int checks = 0, failures = 0;

  clb dut (.clk, .rst_n, .in, .cfg, .out);

  always #5 clk = ~clk;

  // modes per slice: {side2 f1 f0, side1 f1 f0}
  localparam logic [3:0] MODE [4] = '{4'b01_01, 4'b00_00, 4'b10_10, 4'b11_11};
  localparam logic [1:0] BYP  [4] = '{2'b11, 2'b00, 2'b01, 2'b10};   // {cout, s}

  function automatic logic ref_s(input logic [1:0] m, input logic a, b, c);
    case (m)
      2'b00:   return b ^ c;
      2'b01:   return a ^ b ^ c;
      2'b10:   return ~b;
      default: return ~(a ^ b);
    endcase
  endfunction

  function automatic logic ref_c(input logic [1:0] m, input logic d, e, f);
    case (m)
      2'b00:   return e & f;
      2'b01:   return (d & e) | (d & f) | (e & f);
      2'b10:   return e;
      default: return d | e;
    endcase
  endfunction

  initial begin
    for (int q = 0; q < 4; q++) cfg[q*6 +: 6] = {BYP[q], MODE[q]};
    rst_n = 0;
    in = '0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      in_prev = in;
      @(posedge clk); #1;
      in = 24'($urandom);
      #1;
      for (int q = 0; q < 4; q++) begin
        logic [5:0] vs;
        logic es, ec;
        vs = BYP[q][0] ? in[q*6 +: 6] : in_prev[q*6 +: 6];
        es = ref_s(MODE[q][1:0], vs[0], vs[1], vs[2]);
        vs = BYP[q][1] ? in[q*6 +: 6] : in_prev[q*6 +: 6];
        ec = ref_c(MODE[q][3:2], vs[3], vs[4], vs[5]);
        checks += 2;
        if (out[2*q] !== es || out[2*q+1] !== ec) begin
          failures++;
          $display("FAIL slice %0d in=%h out=%b exp=%b%b", q, in, out[2*q +: 2], ec, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
