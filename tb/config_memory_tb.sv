// config_memory_tb -- loads random bitstreams serially and checks the parallel word, the
// serial read-back at cfg_out, that the word holds while cfg_en is low, and the load time
// (one bit per clock: BITS cycles for a full bitstream), and that the word seen by the
// fabric is all zeros during the power-on reset and while a load is in progress.
module config_memory_tb;
  localparam int BITS = 77;

  logic clk = 0, por_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [BITS-1:0] cfg, image;
  int checks = 0, failures = 0;
  int cycles;

  config_memory #(.BITS(BITS)) dut (.clk, .por_n, .cfg_en, .cfg_in, .cfg_out, .cfg);

  always #5 clk = ~clk;
  always @(posedge clk) if (cfg_en) cycles++;

  initial begin
    // power-on: the fabric sees zeros at once, and the memory is cleared by the first edge
    #1;
    checks++;
    if (cfg !== '0) begin
      failures++;
      $display("FAIL output not gated during power-on reset");
    end
    @(negedge clk);
    por_n = 1;
    #1;
    checks++;
    if (cfg !== '0 || cfg_out !== 1'b0) begin
      failures++;
      $display("FAIL memory not cleared by power-on reset");
    end
    for (int r = 0; r < 5; r++) begin
      for (int k = 0; k < BITS; k++) image[k] = 1'($urandom);
      cycles = 0;
      // bit 0 first
      for (int k = 0; k < BITS; k++) begin
        @(negedge clk);
        cfg_en = 1;
        cfg_in = image[k];
        #1;
        checks++;
        if (cfg !== '0) begin
          failures++;
          $display("FAIL output not gated while loading");
        end
      end
      @(negedge clk);
      cfg_en = 0;
      #1;
      checks += 2;
      if (cfg !== image) begin
        failures++;
        $display("FAIL image %0d: got %h exp %h", r, cfg, image);
      end
      if (cycles != BITS) begin
        failures++;
        $display("FAIL load took %0d cycles", cycles);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (cfg !== image) begin
        failures++;
        $display("FAIL word changed while cfg_en low");
      end
      // read back serially while shifting zeros in
      for (int k = 0; k < BITS; k++) begin
        checks++;
        if (cfg_out !== image[k]) begin
          failures++;
          $display("FAIL read-back bit %0d", k);
        end
        cfg_en = 1;
        cfg_in = 0;
        @(negedge clk);
      end
      cfg_en = 0;
      #1;
      checks++;
      if (cfg !== '0) begin
        failures++;
        $display("FAIL not cleared after shifting zeros");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
