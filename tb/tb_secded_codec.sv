// tb_secded_codec: self-checking test of the SEC-DED RAM-word codec.
// For random words: a clean code word decodes to the word with no flags;
// every single-bit error (data or check bit) is corrected; random double-bit
// errors are flagged uncorrectable. Also checks that the code has distance 4
// by confirming no single flip yields another valid code word.
module tb_secded_codec;
  localparam int DW = 8, CW = 5, N = DW + CW;
  logic [DW-1:0] enc_data, dec_data;
  logic [N-1:0]  enc_cw, dec_cw;
  logic          corr, unc;
  int checks = 0, failures = 0;

  secded_codec #(.DATA_W(DW), .CHECK_W(CW)) dut (
    .enc_data(enc_data), .enc_cw(enc_cw), .dec_cw(dec_cw),
    .dec_data(dec_data), .dec_corrected(corr), .dec_uncorrectable(unc));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s data=%h cw=%h", what, enc_data, dec_cw);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [N-1:0] cw;
      enc_data = DW'($urandom);
      #1;
      cw = enc_cw;
      check(cw[DW-1:0] == enc_data, "systematic");
      dec_cw = cw; #1;
      check(dec_data == enc_data && !corr && !unc, "clean");
      for (int b = 0; b < N; b++) begin
        dec_cw = cw ^ (N'(1) << b); #1;
        check(dec_data == enc_data && corr && !unc, "single");
      end
      begin
        automatic int a = $urandom_range(N - 1), b;
        do b = $urandom_range(N - 1); while (b == a);
        dec_cw = cw ^ (N'(1) << a) ^ (N'(1) << b); #1;
        check(unc && !corr, "double");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
