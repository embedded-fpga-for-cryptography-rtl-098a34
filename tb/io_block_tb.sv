// io_block_tb -- checks the IO site: output pad multiplexer over the channel wires and the
// input pad path into the fabric.
module io_block_tb;
  import efpga_pkg::*;

  localparam int CW = 16;

  logic [CW-1:0] chan;
  logic [io_cfg_bits(CW)-1:0] cfg;
  logic pad_in, pad_out, fabric_in;
  int checks = 0, failures = 0;

  io_block #(.CW(CW)) dut (.chan, .cfg, .pad_in, .pad_out, .fabric_in);

  initial begin
    for (int k = 0; k < 500; k++) begin
      logic exp;
      chan = 16'($urandom);
      cfg = 5'($urandom_range(0, CW));
      pad_in = 1'($urandom);
      #1;
      exp = (cfg == 0) ? 1'b0 : chan[cfg - 1];
      checks += 2;
      if (pad_out !== exp) begin
        failures++;
        $display("FAIL pad_out sel=%0d chan=%h got %b", cfg, chan, pad_out);
      end
      if (fabric_in !== pad_in) begin
        failures++;
        $display("FAIL fabric_in");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
