// tb_bch_encoder: self-checking test of the byte-oriented BCH encoder at the
// full page size (2048 bytes). Each code word is checked two independent
// ways: (1) the parity equals the remainder of a bit-serial long division by
// g(x) done here, and (2) the code word, read as a polynomial (first bit =
// highest power), has alpha^j as a root for j = 1..30, which is what makes
// it a t = 15 BCH code word whatever g(x) is. Also checks the code word
// length (2048 + 29 bytes at one byte per clock) and in_ready.
module tb_bch_encoder;
  import imm_pkg::*;
  localparam int PB = PAGE_BYTES, NB = PAGE_BYTES + BCH_PAR_BYTES;
  logic clk = 0, rst_n = 0, start = 0, iv = 0, ir, ov, last;
  logic [7:0] id = 0, od;
  int checks = 0, failures = 0;
  byte unsigned msg[PB];
  byte unsigned cw[$];

  bch_encoder dut (.clk, .rst_n, .start, .in_valid(iv), .in_data(id),
    .in_ready(ir), .out_valid(ov), .out_data(od), .last);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (ov) cw.push_back(od);

  function automatic bit getbit(int k); // k-th transmitted bit
    return cw[k / 8][7 - k % 8];
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      automatic int cycles = 0;
      cw = {};
      foreach (msg[i]) msg[i] = (p == 0) ? 8'h00 : (p == 1) ? 8'hff : 8'($urandom);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < PB; i++) begin
        check(ir, "ready in data phase");
        iv = 1; id = msg[i]; @(negedge clk); cycles++;
      end
      iv = 0;
      while (!last) begin check(!ir, "not ready in parity"); @(negedge clk); cycles++; end
      @(negedge clk); cycles++;
      check(cycles == NB, "cycle count");
      check(cw.size() == NB, "code word length");
      // (1) bit-serial long division
      begin
        automatic logic [BCH_PAR-1:0] r = '0;
        automatic logic [BCH_PAR_BYTES*8-1:0] par = '0;
        for (int k = 0; k < PB * 8; k++) begin
          automatic logic fb = getbit(k) ^ r[BCH_PAR-1];
          r = r << 1;
          if (fb) r ^= BCH_G[BCH_PAR-1:0];
        end
        for (int b = 0; b < BCH_PAR_BYTES; b++) par = {par[BCH_PAR_BYTES*8-9:0], cw[PB + b]};
        check(par == {r, 7'b0}, "parity = remainder");
        for (int i = 0; i < PB; i++) check(cw[i] == msg[i], "systematic");
      end
      // (2) roots alpha^1..alpha^30, Horner over the 16609 code bits
      for (int j = 1; j <= 2 * BCH_T; j++) begin
        automatic gf_t a = gf_alpha_pow(j), s = '0;
        for (int k = 0; k < PB * 8 + BCH_PAR; k++) s = gf_mul(s, a) ^ gf_t'(getbit(k));
        check(s == '0, $sformatf("root alpha^%0d", j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
