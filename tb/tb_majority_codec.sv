// tb_majority_codec: exhaustive test of the 7-fold repetition code. Every
// possible spare byte is decoded and compared with a vote counted here; the
// encoder output is checked for both bit values, including the erased-flash
// byte 0xFF (must read as "not a table copy").
module tb_majority_codec;
  logic       bit_in, bit_out, is_copy;
  logic [7:0] byte_out, byte_in;
  logic [1:0] errs;
  int checks = 0, failures = 0;

  majority_codec dut (.bit_in(bit_in), .byte_out(byte_out), .byte_in(byte_in),
                      .bit_out(bit_out), .is_table_copy(is_copy), .err_count(errs));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s byte=%h", what, byte_in);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit_in = 1'b0; #1; check(byte_out == 8'h00, "enc0");
    bit_in = 1'b1; #1; check(byte_out == 8'h7f, "enc1");
    for (int v = 0; v < 256; v++) begin
      automatic int ones = 0;
      byte_in = 8'(v);
      for (int i = 0; i < 7; i++) ones += v >> i & 1;
      #1;
      check(bit_out == (ones > 3), "vote");
      check(is_copy == (ones <= 3), "copy flag");
      check(errs == ((ones > 3) ? 7 - ones : ones), "errors");
    end
    byte_in = 8'hff; #1; check(!is_copy, "erased");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
