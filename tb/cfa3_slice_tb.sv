// cfa3_slice_tb -- exhaustive check of the merged three-input cFA slice: all 16 cFA settings,
// both output selections and all input patterns on the bypassed path, then random stimuli
// on the registered path (one cycle of latency, reset to 0).
module cfa3_slice_tb;
  import efpga_pkg::*;

  logic clk = 0, rst_n = 0, sel_side2, bypass, out;
  logic [2:0] in;
  cfa_cfg_t cfa_cfg;
  int checks = 0, failures = 0;
  logic expq;

  cfa3_slice dut (.clk, .rst_n, .in, .cfa_cfg, .sel_side2, .bypass, .out);

  always #5 clk = ~clk;

  function automatic logic ref_out(input logic [3:0] m, input logic sel, input logic [2:0] v);
    logic a, b, c;
    {c, b, a} = v;
    if (!sel)
      case (m[1:0])
        2'b00:   return b ^ c;
        2'b01:   return a ^ b ^ c;
        2'b10:   return ~b;
        default: return ~(a ^ b);
      endcase
    else
      case (m[3:2])
        2'b00:   return b & c;
        2'b01:   return (a & b) | (a & c) | (b & c);
        2'b10:   return b;
        default: return a | b;
      endcase
  endfunction

  initial begin
    bypass = 1;
    #1;
    for (int m = 0; m < 16; m++)
      for (int sl = 0; sl < 2; sl++)
        for (int v = 0; v < 8; v++) begin
          cfa_cfg = cfa_cfg_t'(m[3:0]);
          sel_side2 = sl[0];
          in = v[2:0];
          #1;
          checks++;
          if (out !== ref_out(m[3:0], sl[0], v[2:0])) begin
            failures++;
            $display("FAIL m=%0d sel=%0d in=%b out=%b", m, sl, in, out);
          end
        end
    // registered path
    bypass = 0;
    cfa_cfg = 4'b0101;
    sel_side2 = 1;
    @(negedge clk);
    checks++;
    if (out !== 1'b0) failures++;
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      in = 3'($urandom);
      sel_side2 = 1'($urandom);
      expq = ref_out(4'b0101, sel_side2, in);
      @(negedge clk);
      checks++;
      if (out !== expq) begin
        failures++;
        $display("FAIL registered in=%b out=%b exp=%b", in, out, expq);
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
