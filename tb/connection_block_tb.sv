// connection_block_tb -- checks the pin multiplexers of a connection block.
//
// Random channel values and random per-pin selects; each pin must show 0 for select 0 and
// w_idx sel-1 of the channel on side (pin / 6) otherwise. Also checks that every pin can reach
// every w_idx of its channel (walking one-hot channel pattern).
module connection_block_tb;
  import efpga_pkg::*;

  localparam int CW = 16;
  localparam int SW = sel_bits(CW);

  logic [3:0][CW-1:0] chan;
  logic [CLB_INPUTS*SW-1:0] cfg;
  logic [CLB_INPUTS-1:0] pin;
  int checks = 0, failures = 0;

  connection_block #(.CW(CW)) dut (.chan, .cfg, .pin);

  task automatic check_all();
    for (int p = 0; p < CLB_INPUTS; p++) begin
      int sel;
      logic exp;
      sel = int'(cfg[p*SW +: SW]);
      exp = (sel == 0 || sel > CW) ? 1'b0 : chan[p / 6][sel - 1];
      checks++;
      if (pin[p] !== exp) begin
        failures++;
        $display("FAIL pin %0d sel %0d got %b exp %b", p, sel, pin[p], exp);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 200; k++) begin
      chan = {$urandom, $urandom};
      for (int p = 0; p < CLB_INPUTS; p++) cfg[p*SW +: SW] = SW'($urandom_range(0, CW));
      #1 check_all();
    end
    for (int w_idx = 0; w_idx < CW; w_idx++)
      for (int side = 0; side < 4; side++) begin
        chan = '0;
        chan[side][w_idx] = 1'b1;
        for (int p = 0; p < CLB_INPUTS; p++) cfg[p*SW +: SW] = SW'(w_idx + 1);
        #1 check_all();
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
