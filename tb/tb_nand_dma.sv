// tb_nand_dma: self-checking test of the page DMA engine with a behavioural
// NAND model (512-byte pages). Programs a page from the input buffer and
// checks the stored page: data, BCH parity (by long division here), the
// logical address in the spare bytes and the marker byte. Reads it back with
// injected errors and compares the output buffer; copies it to another page
// and reads the copy; erases and checks the bad-block query; checks that a
// read of a wrong address reports an LSA mismatch. Also checks the program
// transfer time (page + spare bytes on consecutive cycles).
module tb_nand_dma;
  import imm_pkg::*;
  localparam int PAGE_B = 512, AW = 7, PW = 2, NPG = 4;
  localparam int CWB = PAGE_B + BCH_PAR_BYTES, NB = CWB + 5;

  logic clk = 0, rst_n = 0;
  logic op_valid = 0, op_done, op_fail;
  nand_op_e op = NOP_NONE;
  logic [AW-1:0] op_src = 0, op_dst = 0;
  logic [20:0] op_lsa = 0;
  logic hw_en = 0;
  logic [8:0] hw_addr = 0, hr_addr = 0;
  logic [7:0] hw_data = 0, hr_data;
  logic [4:0] rd_bits;
  logic rd_unc, rd_lsa_corr, rd_lsa_err, rd_copy;
  logic [31:0] buf_corr;
  fi_mode_e fi_mode = FI_OFF;
  logic [15:0] fi_num = 0, fi_cnt;
  logic nf_req, nf_done, nf_fail, nf_wvalid, nf_rvalid;
  nand_op_e nf_op;
  logic [AW-1:0] nf_addr;
  logic [7:0] nf_wdata, nf_rdata;
  int violations, n_prog, n_read, n_erase;
  int checks = 0, failures = 0;
  byte unsigned page[PAGE_B];

  nand_dma #(.PAGE_B(PAGE_B), .AW(AW)) dut (
    .clk, .rst_n, .op_valid, .op, .op_src, .op_dst, .op_lsa, .op_done, .op_fail,
    .hw_en, .hw_addr, .hw_data, .hr_addr, .hr_data,
    .rd_bit_errors(rd_bits), .rd_uncorrectable(rd_unc), .rd_lsa_corrected(rd_lsa_corr),
    .rd_lsa_error(rd_lsa_err), .rd_table_copy(rd_copy), .cnt_buf_corrected(buf_corr),
    .fi_mode, .fi_err_num(fi_num), .fi_err_rate(16'd30), .fi_err_thresh(16'd0),
    .fi_seed_load(1'b0), .fi_seed(32'h5), .fi_inj_count(fi_cnt),
    .nf_req, .nf_op, .nf_addr, .nf_done, .nf_fail, .nf_wvalid, .nf_wdata,
    .nf_rvalid, .nf_rdata);

  nand_page_model #(.NBLK(32), .NPG(NPG), .AW(AW), .PW(PW), .NB(NB),
                    .BAD_A(3), .BAD_B(20)) flash (
    .clk, .nf_req(nf_req && rst_n), .nf_op, .nf_addr, .nf_done, .nf_fail,
    .nf_wvalid, .nf_wdata, .nf_rvalid, .nf_rdata, .spare_flip(8'h00),
    .violations, .n_program(n_prog), .n_read(n_read), .n_erase(n_erase));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", what, $time); end
  endtask

  int wcycles;
  always @(posedge clk) if (nf_wvalid) wcycles++;

  task automatic run(nand_op_e o, int src, int dst, int lsa);
    @(negedge clk);
    op_valid = 1; op = o; op_src = AW'(src); op_dst = AW'(dst); op_lsa = 21'(lsa);
    while (!op_done) @(negedge clk);
    op_valid = 0;
  endtask

  task automatic check_out(string what);
    automatic int bad = 0;
    for (int i = 0; i < PAGE_B; i++) begin
      @(negedge clk); hr_addr = 9'(i); #1;
      if (hr_data != page[i]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d bytes wrong", what, bad));
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(NOP_CHKBAD, 3 * NPG, 0, 0);  check(op_fail, "bad block reported");
    run(NOP_CHKBAD, 4 * NPG, 0, 0);  check(!op_fail, "good block reported");
    foreach (page[i]) begin
      page[i] = 8'($urandom);
      @(negedge clk); hw_en = 1; hw_addr = 9'(i); hw_data = page[i];
    end
    @(negedge clk); hw_en = 0;
    wcycles = 0;
    run(NOP_PROGRAM, 0, 9, 21'h12345);
    check(wcycles == NB, $sformatf("program transfer %0d cycles", wcycles));
    // stored page: data, parity, LSA, marker
    begin
      automatic logic [BCH_PAR-1:0] r = '0;
      automatic logic [BCH_PAR_BYTES*8-1:0] par = '0;
      automatic bit same = 1;
      for (int i = 0; i < PAGE_B; i++) same &= (flash.mem[9][i] == page[i]);
      check(same, "stored data");
      for (int k = 0; k < PAGE_B * 8; k++) begin
        automatic logic fb = page[k / 8][7 - k % 8] ^ r[BCH_PAR-1];
        r = r << 1;
        if (fb) r ^= BCH_G[BCH_PAR-1:0];
      end
      for (int b = 0; b < BCH_PAR_BYTES; b++) par = {par[BCH_PAR_BYTES*8-9:0], flash.mem[9][PAGE_B + b]};
      check(par == {r, 7'b0}, "stored BCH parity");
      check({flash.mem[9][CWB + 2][4:0], flash.mem[9][CWB + 1], flash.mem[9][CWB]} == 21'h12345,
            "stored LSA");
      check(flash.mem[9][CWB + 4] == 8'h7f, "stored marker byte");
    end
    fi_mode = FI_COUNT; fi_num = 15;
    run(NOP_READ, 9, 0, 21'h12345);
    check(rd_bits == 15 && !rd_unc && !rd_lsa_err && !rd_copy, "read status, 15 errors");
    check_out("read with 15 errors");
    fi_num = 5;
    run(NOP_COPY, 9, 10, 21'h12345);
    check(n_prog == 2, "copy programs the destination");
    fi_mode = FI_OFF;
    run(NOP_READ, 10, 0, 21'h12345);
    check(rd_bits == 0 && !rd_lsa_err, "copy was stored corrected");
    check_out("copied page");
    run(NOP_READ, 10, 0, 21'h00001);
    check(rd_lsa_err, "LSA mismatch reported");
    run(NOP_ERASE, 0, 8, 0);
    check(!op_fail && !flash.mem.exists(9) && n_erase == 1, "erase");
    run(NOP_READ, 9, 0, 0);
    check(rd_unc, "erased page is not a code word");
    check(violations == 0, "flash rules kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
