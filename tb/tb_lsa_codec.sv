// tb_lsa_codec: self-checking test of the 21+7 bit SEC-DED code that guards
// the logical sector address in the spare area. Checks the spare packing
// (28 used bits, top 4 zero), clean decode, correction of every single-bit
// error and detection of double-bit errors, for random addresses.
module tb_lsa_codec;
  logic [20:0] lsa, lsa_out;
  logic [31:0] spare_wr, spare_rd;
  logic        corr, unc;
  int checks = 0, failures = 0;

  lsa_codec dut (.lsa(lsa), .spare_wr(spare_wr), .spare_rd(spare_rd),
                 .lsa_out(lsa_out), .corrected(corr), .uncorrectable(unc));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s lsa=%h rd=%h out=%h", what, lsa, spare_rd, lsa_out);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [31:0] w;
      lsa = 21'($urandom);
      #1;
      w = spare_wr;
      check(w[31:28] == 4'h0 && w[20:0] == lsa, "packing");
      spare_rd = w; #1;
      check(lsa_out == lsa && !corr && !unc, "clean");
      for (int b = 0; b < 28; b++) begin
        spare_rd = w ^ (32'd1 << b); #1;
        check(lsa_out == lsa && corr && !unc, "single");
      end
      for (int k = 0; k < 4; k++) begin
        automatic int a = $urandom_range(27), b;
        do b = $urandom_range(27); while (b == a);
        spare_rd = w ^ (32'd1 << a) ^ (32'd1 << b); #1;
        check(unc && !corr, "double");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
