// tb_hk_monitor: self-checking test of the housekeeping threshold monitor.
// Drives sample sequences and checks that the power-off request rises exactly
// in the cycle after the PERSIST-th consecutive violating sample (current or
// temperature), that a good sample resets the run, and that clear_req drops it.
module tb_hk_monitor;
  localparam int P = 3;
  logic clk = 0, rst_n = 0;
  logic sv = 0, clr = 0;
  logic [13:0] cur = 0, tmp = 0, cthr = 14'd1000, tthr = 14'd3000;
  logic req, oc, ot;
  int checks = 0, failures = 0;

  hk_monitor #(.PERSIST(P)) dut (.clk, .rst_n, .sample_valid(sv), .current(cur),
    .temperature(tmp), .current_thr(cthr), .temp_thr(tthr), .clear_req(clr),
    .power_off_req(req), .over_current(oc), .over_temp(ot));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic sample(int c, int t);
    @(negedge clk); sv = 1; cur = 14'(c); tmp = 14'(t);
    @(negedge clk); sv = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // two violations, then a good sample: no request
    sample(1500, 100); check(oc && !ot && !req, "oc1");
    sample(1500, 100); check(!req, "oc2");
    sample(500, 100);  check(!oc && !req, "reset run");
    sample(1500, 100); sample(100, 3500); check(ot && !req, "mixed 2");
    sample(1200, 3100); check(req, "third violation raises request");
    sample(10, 10); check(req, "sticky");
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    check(!req, "clear");
    // random sequences against a reference counter
    begin
      automatic int run = 0; automatic bit exp_req = 0;
      for (int i = 0; i < 300; i++) begin
        automatic int c = $urandom_range(1100, 900);
        automatic int t = $urandom_range(3100, 2900);
        automatic bit bad = (c > 1000) || (t > 3000);
        sample(c, t);
        run = bad ? run + 1 : 0;
        if (run >= P) exp_req = 1;
        check(req == exp_req, "random");
        if (exp_req && $urandom_range(3) == 0) begin
          @(negedge clk); clr = 1; @(negedge clk); clr = 0;
          exp_req = 0; run = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
