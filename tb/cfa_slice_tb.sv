// cfa_slice_tb -- checks the slice as a full adder, registered and bypassed.
//
// The slice is configured as a full adder (XOR3 and majority). With both bypass bits set
// the outputs must equal the sum and carry of the current inputs; with them clear the
// outputs must equal the sum and carry of the inputs applied before the previous clock edge
// (one cycle of latency). Reset must clear the registered outputs. Random inputs.
module cfa_slice_tb;
  import efpga_pkg::*;

  logic clk = 0, rst_n;
  logic [5:0] in;
  slice_cfg_t cfg;
  logic [1:0] out;
  int checks = 0, failures = 0;
  logic [1:0] prev;

  cfa_slice dut (.clk, .rst_n, .in, .cfg, .out);

  always #5 clk = ~clk;

  function automatic logic [1:0] fa(input logic [5:0] v);
    logic [1:0] sum_abc, sum_def;
    sum_abc = v[0] + v[1] + v[2];
    sum_def = v[3] + v[4] + v[5];
    return {sum_def[1], sum_abc[0]};
  endfunction

  task automatic check(input logic [1:0] exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s in=%b out=%b exp=%b", what, in, out, exp);
    end
  endtask

  initial begin
    cfg = '{bypass_cout: 1'b1, bypass_s: 1'b1,
            cfa: '{side2: '{f1: 1'b0, f0: 1'b1}, side1: '{f1: 1'b0, f0: 1'b1}}};
    rst_n = 0;
    in = '1;
    @(posedge clk); #1;
    // combinational path
    for (int k = 0; k < 64; k++) begin
      in = k[5:0];
      #1 check(fa(in), "bypass");
    end
    // registered path: reset clears, then one-cycle latency
    cfg.bypass_s = 1'b0;
    cfg.bypass_cout = 1'b0;
    in = '1;
    @(posedge clk); #1;
    check(2'b00, "reset");
    rst_n = 1;
    prev = 2'b00;
    for (int k = 0; k < 200; k++) begin
      in = 6'($urandom);
      #1 check(prev, "hold");          // output still the previous sample
      @(posedge clk); #1;
      prev = fa(in);
      check(prev, "registered");
    end
    // mixed: sum bypassed, carry registered
    cfg.bypass_s = 1'b1;
    in = 6'b111_011;
    @(posedge clk); #1;
    in = 6'b000_100;
    #1;
    prev = fa(6'b111_011);
    checks++;
    if (out !== {prev[1], 1'b1}) begin
      failures++;
      $display("FAIL mixed out=%b", out);
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
