// tb_imm_top: end-to-end test of the memory core on a small flash (32 blocks
// of 4 pages, 512-byte pages, 2 log blocks) through a behavioural NAND
// model. The host writes random pages to random logical pages (many
// overwrites) and reads them back, comparing every byte with a copy kept
// here. Bit errors are injected on the flash read path by the fault
// injector (0..15 per code word must be corrected and counted; 20 must be
// flagged), bit errors in the spare area test the address and marker codes,
// a bit flipped inside the input buffer tests its SEC-DED protection, and
// housekeeping samples test the power-off request. Every mechanism is
// counted; one that never happened counts as a failure.
module tb_imm_top;
  import imm_pkg::*;
  localparam int PAGE_B = 512, NBLK = 32, NPG = 4, NLOG = 2, LBLKS = 12;
  localparam int BW = 5, PW = 2, LBW = 4, NLPN = LBLKS * NPG;
  localparam int NB = PAGE_B + BCH_PAR_BYTES + 5;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_write = 0;
  logic [LBW+PW-1:0] cmd_lpn = 0;
  logic resp_valid, resp_ok, resp_unc, resp_lsa_err, resp_lsa_corr, resp_copy;
  logic [4:0] resp_bits;
  logic [BW+PW-1:0] resp_ppa;
  logic wbuf_en = 0;
  logic [8:0] wbuf_addr = 0, rbuf_addr = 0;
  logic [7:0] wbuf_data = 0, rbuf_data;
  logic bg = 0, ready;
  logic [BW:0] free_b, dirty_b, bad_b;
  logic [31:0] c_merge, c_erase, c_log, c_wl, c_gcd, c_buf;
  fi_mode_e fi_mode = FI_OFF;
  logic [15:0] fi_num = 0, fi_rate = 20, fi_thr = 0, fi_cnt;
  logic fi_seed_load = 0;
  logic hk_sv = 0, hk_clr = 0, poff, hk_oc, hk_ot;
  logic [13:0] hk_cur = 0, hk_tmp = 0;
  logic nf_req, nf_done, nf_fail, nf_wvalid, nf_rvalid;
  nand_op_e nf_op;
  logic [BW+PW-1:0] nf_addr;
  logic [7:0] nf_wdata, nf_rdata, spare_flip = 0;
  int violations, n_prog, n_read, n_erase;
  int checks = 0, failures = 0;

  imm_top #(.PAGE_B(PAGE_B), .NBLK(NBLK), .NPG(NPG), .NLOG(NLOG), .LBLKS(LBLKS),
            .GC_THRESH(3), .WL_PERIOD(4), .WL_THRESH(2)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_lpn,
    .resp_valid, .resp_ok, .resp_bit_errors(resp_bits), .resp_uncorrectable(resp_unc),
    .resp_lsa_error(resp_lsa_err), .resp_lsa_corrected(resp_lsa_corr),
    .resp_table_copy(resp_copy), .resp_ppa,
    .wbuf_en, .wbuf_addr, .wbuf_data, .rbuf_addr, .rbuf_data,
    .bg_gc_en(bg), .ready, .free_blocks(free_b), .dirty_blocks(dirty_b),
    .bad_blocks(bad_b), .cnt_merges(c_merge), .cnt_erases(c_erase),
    .cnt_log_writes(c_log), .cnt_wl_moves(c_wl), .cnt_gc_demand(c_gcd),
    .cnt_buf_corrected(c_buf),
    .fi_mode, .fi_err_num(fi_num), .fi_err_rate(fi_rate), .fi_err_thresh(fi_thr),
    .fi_seed_load, .fi_seed(32'hace1), .fi_inj_count(fi_cnt),
    .hk_sample_valid(hk_sv), .hk_current(hk_cur), .hk_temperature(hk_tmp),
    .hk_current_thr(14'd2000), .hk_temp_thr(14'd5000), .hk_clear(hk_clr),
    .power_off_req(poff), .hk_over_current(hk_oc), .hk_over_temp(hk_ot),
    .nf_req, .nf_op, .nf_addr, .nf_done, .nf_fail, .nf_wvalid, .nf_wdata,
    .nf_rvalid, .nf_rdata);

  nand_page_model #(.NBLK(NBLK), .NPG(NPG), .AW(BW + PW), .PW(PW), .NB(NB),
                    .BAD_A(3), .BAD_B(20), .ERASE_FAIL_AT(5)) flash (
    .clk, .nf_req(nf_req && rst_n), .nf_op, .nf_addr, .nf_done, .nf_fail, .nf_wvalid, .nf_wdata,
    .nf_rvalid, .nf_rdata, .spare_flip, .violations, .n_program(n_prog),
    .n_read(n_read), .n_erase(n_erase));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", what, $time); end
  endtask

  byte unsigned ref_page [NLPN][PAGE_B];
  bit           ref_v    [NLPN];
  int n_corrected = 0, n_unc = 0, n_lsa_corr = 0, n_bg_erase = 0, n_direct = 0;

  // every erase request not started by on-demand GC is a background one
  int n_erase_req = 0;
  always @(posedge clk) if (nf_req && nf_op == NOP_ERASE && nf_done) n_erase_req++;

  task automatic issue(bit wr, int lpn);
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_lpn = (LBW+PW)'(lpn);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
    while (!resp_valid) @(negedge clk);
  endtask

  task automatic write_page(int lpn, bit flip_buf);
    automatic int log0 = c_log;
    for (int i = 0; i < PAGE_B; i++) begin
      automatic byte unsigned v = 8'($urandom);
      ref_page[lpn][i] = v;
      @(negedge clk); wbuf_en = 1; wbuf_addr = 9'(i); wbuf_data = v;
    end
    @(negedge clk); wbuf_en = 0;
    if (flip_buf) dut.u_dma.in_buf[7] = dut.u_dma.in_buf[7] ^ 13'h004;
    issue(1, lpn);
    check(resp_ok, $sformatf("write %0d", lpn));
    ref_v[lpn] = 1;
    if (c_log == log0) n_direct++;
  endtask

  task automatic read_page(int lpn, int nerr);
    fi_mode = (nerr > 0) ? FI_COUNT : FI_OFF;
    fi_num  = 16'(nerr);
    issue(0, lpn);
    fi_mode = FI_OFF;
    if (!ref_v[lpn]) begin
      check(!resp_ok, "unwritten page not found");
      return;
    end
    check(resp_ok, $sformatf("read %0d found", lpn));
    check(!resp_lsa_err && !resp_copy, "spare area decoded");
    if (resp_lsa_corr) n_lsa_corr++;
    if (nerr > BCH_T) begin
      check(resp_unc, "uncorrectable flagged");
      if (resp_unc) n_unc++;
    end else begin
      automatic int bad = 0;
      check(!resp_unc && resp_bits == 5'(nerr),
            $sformatf("bit errors %0d reported %0d", nerr, resp_bits));
      if (nerr > 0 && resp_bits == 5'(nerr)) n_corrected++;
      for (int i = 0; i < PAGE_B; i++) begin
        @(negedge clk); rbuf_addr = 9'(i); #1;
        if (rbuf_data != ref_page[lpn][i]) bad++;
      end
      check(bad == 0, $sformatf("page %0d data (%0d bytes wrong)", lpn, bad));
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_v[i]) ref_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); fi_seed_load = 1; @(negedge clk); fi_seed_load = 0;
    while (!ready) @(negedge clk);
    check(bad_b == 2, "factory bad blocks found");
    read_page(5, 0);                      // never written
    write_page(5, 1);                     // with a flipped buffer bit
    check(c_buf == 1, "buffer SEC-DED corrected");
    read_page(5, 3);
    for (int i = 0; i < 160; i++) begin
      automatic int lpn = (i < 20) ? NLPN / 2 + i : $urandom_range(NLPN / 2 - 1);
      write_page(lpn, 0);
      if (i % 4 == 0) begin
        automatic int r = $urandom_range(NLPN - 1);
        automatic int e = (i % 40 == 0) ? 20 : $urandom_range(15);
        spare_flip = (i % 16 == 0) ? 8'h01 : 8'h00;
        read_page(r, e);
        spare_flip = 0;
      end
      if (i == 80) bg = 1;
      if (bg && i % 20 == 0) repeat (3000) @(negedge clk);
    end
    for (int l = 0; l < NLPN; l++) read_page(l, l % 16);
    // housekeeping: three over-current samples request power-off
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); hk_sv = 1; hk_cur = 14'd2500; hk_tmp = 14'd100;
      @(negedge clk); hk_sv = 0;
      check(poff == (k == 2), "power-off request after 3 samples");
    end
    n_bg_erase = n_erase_req - int'(c_gcd);
    $display("direct=%0d log=%0d merges=%0d gc_demand=%0d bg_erases=%0d wl=%0d bad=%0d",
             n_direct, c_log, c_merge, c_gcd, n_bg_erase, c_wl, bad_b);
    $display("bch_corrected=%0d uncorrectable=%0d lsa_corrected=%0d buf_corrected=%0d",
             n_corrected, n_unc, n_lsa_corr, c_buf);
    $display("flash: programs=%0d reads=%0d erases=%0d violations=%0d", n_prog, n_read, n_erase, violations);
    check(violations == 0, "flash rules kept");
    check(n_direct > 0, "direct data-block writes");
    check(c_log > 0, "log-block writes");
    check(c_merge > 0, "merges");
    check(c_gcd > 0, "on-demand garbage collection");
    check(n_bg_erase > 0, "background garbage collection");
    check(c_wl > 0, "static wear levelling");
    check(bad_b == 3, "grown bad block");
    check(n_corrected > 0 && n_unc > 0, "BCH correction and detection");
    check(n_lsa_corr > 0, "LSA SEC-DED correction");
    check(poff, "power-off request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
