// tb_fault_injector: self-checking test of the NAND-bus fault injector.
// COUNT mode: exactly err_num single-bit errors at bytes rate-1, 2*rate-1, ...
// RATE mode: an error at every rate-th byte across a long stream.
// RANDOM mode: every corrupted byte differs in one bit, inj_count equals the
// errors seen, and the observed rate is near err_thresh/65536.
// OFF mode: the stream passes untouched.
module tb_fault_injector;
  import imm_pkg::*;
  logic clk = 0, rst_n = 0;
  fi_mode_e mode = FI_OFF;
  logic [15:0] num = 0, rate = 1, thr = 0, cnt;
  logic seed_load = 0, page_start = 0, dv = 0, inj;
  logic [31:0] seed = 32'h1234_5678;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;

  fault_injector dut (.clk, .rst_n, .mode, .err_num(num), .err_rate(rate),
    .err_thresh(thr), .seed_load, .seed, .page_start, .data_valid(dv),
    .data_in(din), .data_out(dout), .inject(inj), .inj_count(cnt));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  // run n bytes; return the byte indices (from page start) that were hit
  task automatic run(int n, output int hits[$]);
    hits = {};
    @(negedge clk); page_start = 1; @(negedge clk); page_start = 0;
    for (int i = 0; i < n; i++) begin
      din = 8'($urandom); dv = 1;
      #1;
      if (dout != din) begin
        hits.push_back(i);
        check($countones(dout ^ din) == 1, "single bit");
      end
      check(inj == (dout != din), "inject flag");
      @(negedge clk);
    end
    dv = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_load = 1; @(negedge clk); seed_load = 0;
    mode = FI_OFF; run(500, hits); check(hits.size() == 0, "off");
    // COUNT: 7 errors every 100 bytes
    mode = FI_COUNT; num = 7; rate = 100; run(2077, hits);
    check(hits.size() == 7 && cnt == 7, "count number");
    foreach (hits[k]) check(hits[k] == 100 * (k + 1) - 1, "count position");
    // COUNT with rate 1: consecutive bytes
    num = 15; rate = 1; run(300, hits);
    check(hits.size() == 15 && hits[0] == 0 && hits[14] == 14, "count burst");
    // RATE
    mode = FI_RATE; rate = 37; run(2077, hits);
    check(hits.size() == 2077 / 37, "rate number");
    foreach (hits[k]) check(hits[k] == 37 * (k + 1) - 1, "rate position");
    // RANDOM, probability 1/16
    mode = FI_RANDOM; thr = 16'd4096; run(8000, hits);
    check(cnt == 16'(hits.size()), "random count");
    check(hits.size() > 350 && hits.size() < 650, "random rate");
    $display("random mode: %0d errors in 8000 bytes", hits.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
