// tb_bch_decoder: self-checking test of the page BCH decoder at the full
// page size. Code words are built here by bit-serial long division by g(x)
// (independently of the encoder RTL); 0..15 bit errors are put at random
// distinct positions in data or parity, and the decoder must return the
// original page, report the number of errors and not flag the word. Words
// with 17 or more errors must be flagged uncorrectable. The latency from the
// last input byte to the first corrected byte (t + 2 = 17 cycles) and the
// output rate of one byte per clock are checked too.
module tb_bch_decoder;
  import imm_pkg::*;
  localparam int PB = PAGE_BYTES, NB = PAGE_BYTES + BCH_PAR_BYTES;
  localparam int NBITS = PB * 8 + BCH_PAR;
  logic clk = 0, rst_n = 0, iv = 0, ir, ov, done, unc;
  logic [7:0] id = 0, od;
  logic [4:0] ecnt;
  int checks = 0, failures = 0;
  byte unsigned msg[PB];
  byte unsigned cw[NB];
  byte unsigned got[$];

  bch_decoder dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .in_ready(ir),
    .out_valid(ov), .out_data(od), .done, .err_count(ecnt), .uncorrectable(unc));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (ov) got.push_back(od);

  task automatic encode();
    automatic logic [BCH_PAR-1:0] r = '0;
    automatic logic [BCH_PAR_BYTES*8-1:0] par;
    for (int k = 0; k < PB * 8; k++) begin
      automatic logic fb = msg[k / 8][7 - k % 8] ^ r[BCH_PAR-1];
      r = r << 1;
      if (fb) r ^= BCH_G[BCH_PAR-1:0];
    end
    par = {r, 7'b0};
    foreach (msg[i]) cw[i] = msg[i];
    for (int b = 0; b < BCH_PAR_BYTES; b++) cw[PB + b] = par[BCH_PAR_BYTES*8-1 - 8*b -: 8];
  endtask

  task automatic run_word(int nerr);
    automatic int pos[$];
    automatic int lat = 0, first_at = -1, last_at = -1, cyc = 0;
    foreach (msg[i]) msg[i] = 8'($urandom);
    encode();
    while (pos.size() < nerr) begin
      automatic int p = $urandom_range(NBITS - 1);
      if (!(p inside {pos})) pos.push_back(p);
    end
    foreach (pos[k]) cw[pos[k] / 8][7 - pos[k] % 8] ^= 1'b1;
    got = {};
    while (!ir) @(negedge clk);
    for (int i = 0; i < NB; i++) begin
      iv = 1; id = cw[i]; @(negedge clk);
    end
    iv = 0;
    while (!done) begin
      @(negedge clk); cyc++;
      if (ov && first_at < 0) first_at = cyc;
      if (ov) last_at = cyc;
    end
    if (nerr <= BCH_T) begin
      automatic bit same = (got.size() == PB);
      for (int i = 0; i < PB && same; i++) same = (got[i] == msg[i]);
      check(same, $sformatf("corrected page, %0d errors", nerr));
      check(ecnt == 5'(nerr), $sformatf("error count %0d vs %0d", ecnt, nerr));
      check(!unc, "not flagged");
      check(first_at == 17, $sformatf("latency %0d", first_at));
      check(last_at - first_at == PB - 1, "one byte per clock");
    end else begin
      check(unc, $sformatf("%0d errors flagged", nerr));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (msg[i]) msg[i] = 0;
    run_word(0);
    run_word(1);
    run_word(2);
    run_word(7);
    run_word(14);
    run_word(15);
    run_word(15);
    for (int k = 0; k < 3; k++) run_word($urandom_range(15));
    run_word(17);
    run_word(20);
    run_word(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
