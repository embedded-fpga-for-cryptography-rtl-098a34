// switch_block_tb -- checks a full (interior), a partial (edge) and a corner switch block of
// an 8 x 8 fabric with 16-wire channels and length-4 segments, and an interior one with
// length-1 segments, through the sb_check helper.
module switch_block_tb;
  int c0, f0, c1, f1, c2, f2, c3, f3;
  bit d0, d1, d2, d3;
  int checks, failures;

  sb_check #(.X(3), .Y(2)) u_full    (.checks(c0), .failures(f0), .done(d0));
  sb_check #(.X(0), .Y(5)) u_edge    (.checks(c1), .failures(f1), .done(d1));
  sb_check #(.X(8), .Y(8)) u_corner  (.checks(c2), .failures(f2), .done(d2));
  sb_check #(.X(4), .Y(4), .SEG_LEN(1)) u_len1 (.checks(c3), .failures(f3), .done(d3));

  initial begin
    wait (d0 && d1 && d2 && d3);
    checks = c0 + c1 + c2 + c3;
    failures = f0 + f1 + f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
