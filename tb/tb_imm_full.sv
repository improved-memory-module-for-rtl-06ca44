// tb_imm_full: one complete pass through the memory core at its full size
// (2048-byte pages, 4096 blocks of 128 pages, 4 log blocks) with a
// behavioural NAND model. After the start-up bad-block scan it writes pages
// at three logical addresses, overwrites one (which must go to a log
// block), reads all back with up to 15 injected bit errors, and compares
// every byte.
module tb_imm_full;
  import imm_pkg::*;
  localparam int PAGE_B = PAGE_BYTES, NBLK = NUM_BLOCKS, NPG = PAGES_PER_BLOCK;
  localparam int BW = 12, PW = 7, LBW = 12;
  localparam int NB = PAGE_B + BCH_PAR_BYTES + 5;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_write = 0;
  logic [LBW+PW-1:0] cmd_lpn = 0;
  logic resp_valid, resp_ok, resp_unc, resp_lsa_err, resp_lsa_corr, resp_copy;
  logic [4:0] resp_bits;
  logic [BW+PW-1:0] resp_ppa;
  logic wbuf_en = 0;
  logic [10:0] wbuf_addr = 0, rbuf_addr = 0;
  logic [7:0] wbuf_data = 0, rbuf_data;
  logic ready;
  logic [BW:0] free_b, dirty_b, bad_b;
  logic [31:0] c_merge, c_erase, c_log, c_wl, c_gcd, c_buf;
  fi_mode_e fi_mode = FI_OFF;
  logic [15:0] fi_num = 0, fi_cnt;
  logic poff, hk_oc, hk_ot;
  logic nf_req, nf_done, nf_fail, nf_wvalid, nf_rvalid;
  nand_op_e nf_op;
  logic [BW+PW-1:0] nf_addr;
  logic [7:0] nf_wdata, nf_rdata;
  int violations, n_prog, n_read, n_erase;
  int checks = 0, failures = 0;

  imm_top dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_lpn,
    .resp_valid, .resp_ok, .resp_bit_errors(resp_bits), .resp_uncorrectable(resp_unc),
    .resp_lsa_error(resp_lsa_err), .resp_lsa_corrected(resp_lsa_corr),
    .resp_table_copy(resp_copy), .resp_ppa,
    .wbuf_en, .wbuf_addr, .wbuf_data, .rbuf_addr, .rbuf_data,
    .bg_gc_en(1'b1), .ready, .free_blocks(free_b), .dirty_blocks(dirty_b),
    .bad_blocks(bad_b), .cnt_merges(c_merge), .cnt_erases(c_erase),
    .cnt_log_writes(c_log), .cnt_wl_moves(c_wl), .cnt_gc_demand(c_gcd),
    .cnt_buf_corrected(c_buf),
    .fi_mode, .fi_err_num(fi_num), .fi_err_rate(16'd100), .fi_err_thresh(16'd0),
    .fi_seed_load(1'b0), .fi_seed(32'h1), .fi_inj_count(fi_cnt),
    .hk_sample_valid(1'b0), .hk_current(14'd0), .hk_temperature(14'd0),
    .hk_current_thr(14'd2000), .hk_temp_thr(14'd5000), .hk_clear(1'b0),
    .power_off_req(poff), .hk_over_current(hk_oc), .hk_over_temp(hk_ot),
    .nf_req, .nf_op, .nf_addr, .nf_done, .nf_fail, .nf_wvalid, .nf_wdata,
    .nf_rvalid, .nf_rdata);

  nand_page_model #(.NBLK(NBLK), .NPG(NPG), .AW(BW + PW), .PW(PW), .NB(NB),
                    .BAD_A(17), .BAD_B(2900), .ERASE_FAIL_AT(0)) flash (
    .clk, .nf_req(nf_req && rst_n), .nf_op, .nf_addr, .nf_done, .nf_fail,
    .nf_wvalid, .nf_wdata, .nf_rvalid, .nf_rdata, .spare_flip(8'h00),
    .violations, .n_program(n_prog), .n_read(n_read), .n_erase(n_erase));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", what, $time); end
  endtask

  byte unsigned ref_page [int][PAGE_B];

  task automatic issue(bit wr, int lpn);
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_lpn = (LBW+PW)'(lpn);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
    while (!resp_valid) @(negedge clk);
  endtask

  task automatic write_page(int lpn);
    for (int i = 0; i < PAGE_B; i++) begin
      automatic byte unsigned v = 8'($urandom);
      ref_page[lpn][i] = v;
      @(negedge clk); wbuf_en = 1; wbuf_addr = 11'(i); wbuf_data = v;
    end
    @(negedge clk); wbuf_en = 0;
    issue(1, lpn);
    check(resp_ok, $sformatf("write %0d", lpn));
  endtask

  task automatic read_page(int lpn, int nerr);
    automatic int bad = 0;
    fi_mode = (nerr > 0) ? FI_COUNT : FI_OFF;
    fi_num  = 16'(nerr);
    issue(0, lpn);
    fi_mode = FI_OFF;
    check(resp_ok && !resp_unc && !resp_lsa_err && resp_bits == 5'(nerr),
          $sformatf("read %0d status (bits %0d)", lpn, resp_bits));
    for (int i = 0; i < PAGE_B; i++) begin
      @(negedge clk); rbuf_addr = 11'(i); #1;
      if (rbuf_data != ref_page[lpn][i]) bad++;
    end
    check(bad == 0, $sformatf("page %0d data (%0d bytes wrong)", lpn, bad));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!ready) @(negedge clk);
    check(bad_b == 2 && free_b == NBLK - 2, "start-up scan");
    write_page(0);
    write_page(1);
    write_page(200000);
    write_page(1);                        // overwrite: log block
    check(c_log == 1, "overwrite went to a log block");
    read_page(0, 0);
    read_page(1, 15);
    read_page(200000, 7);
    check(violations == 0, "flash rules kept");
    $display("programs=%0d reads=%0d log writes=%0d", n_prog, n_read, c_log);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
