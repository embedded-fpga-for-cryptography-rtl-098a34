// newcell_slice_tb -- exhaustive check of both sides of the proposed cell over all function
// and inversion settings and all input patterns (bypassed), including the side 2 multiplexer
// steered by B1, then the registered outputs with random settings (one cycle of latency).
module newcell_slice_tb;
  logic clk = 0, rst_n = 0;
  logic a1, b1, a2, b2, inv1, inv2, bypass1, bypass2, out1, out2;
  logic [1:0] fn1, fn2;
  int checks = 0, failures = 0;
  logic e1, e2;

  newcell_slice dut (.clk, .rst_n, .a1, .b1, .a2, .b2, .fn1, .fn2, .inv1, .inv2,
                     .bypass1, .bypass2, .out1, .out2);

  always #5 clk = ~clk;

  function automatic logic ref1(input logic [1:0] f, input logic inv, input logic a, b);
    logic r;
    r = (f == 0) ? (a || b) : (f == 1) ? (a && b) : (f == 2) ? (a != b) : a;
    return inv ? !r : r;
  endfunction

  function automatic logic ref2(input logic [1:0] f, input logic inv, input logic a, b, s);
    logic r;
    r = (f == 0) ? (a || b) : (f == 1) ? (a && b) : (f == 2) ? (a != b) : (s ? b : a);
    return inv ? !r : r;
  endfunction

  initial begin
    bypass1 = 1;
    bypass2 = 1;
    #1;
    for (int f = 0; f < 4; f++)
      for (int iv = 0; iv < 2; iv++)
        for (int v = 0; v < 16; v++) begin
          fn1 = f[1:0]; fn2 = f[1:0]; inv1 = iv[0]; inv2 = ~iv[0];
          {b2, a2, b1, a1} = v[3:0];
          #1;
          checks += 2;
          if (out1 !== ref1(fn1, inv1, a1, b1)) begin
            failures++;
            $display("FAIL side1 fn=%0d inv=%0d a1b1=%b%b out1=%b ref=%b", fn1, inv1, a1, b1, out1, ref1(fn1, inv1, a1, b1));
          end
          if (out2 !== ref2(fn2, inv2, a2, b2, b1)) begin
            failures++;
            $display("FAIL side2 fn=%0d inv=%0d a2b2b1=%b%b%b", fn2, inv2, a2, b2, b1);
          end
        end
    bypass1 = 0;
    bypass2 = 0;
    @(negedge clk);
    checks++;
    if ({out1, out2} !== 2'b00) failures++;
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      {fn1, fn2, inv1, inv2, b2, a2, b1, a1} = 10'($urandom);
      e1 = ref1(fn1, inv1, a1, b1);
      e2 = ref2(fn2, inv2, a2, b2, b1);
      @(negedge clk);
      checks += 2;
      if (out1 !== e1 || out2 !== e2) begin
        failures++;
        $display("FAIL registered out=%b%b exp=%b%b", out1, out2, e1, e2);
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
