// tb_nfatl: self-checking test of the NAND address translation layer on a
// small geometry (32 blocks of 8 pages, 2 log blocks, 16 logical blocks).
// An operation-level NAND model answers the layer's page operations and
// checks the flash rules: a page is programmed only when erased and in
// ascending order inside its block, copies read written pages, bad blocks
// are never touched. Each programmed page stores a tag; the test keeps the
// newest tag of every logical page and checks every read against it.
// Two blocks are factory-bad and one erase fails (grown bad block). The
// test counts merges, log writes, on-demand and background garbage
// collection, wear-levelling moves and grown bad blocks, and fails if any
// of them never happened.
module tb_nfatl;
  import imm_pkg::*;
  localparam int NBLK = 32, NPG = 8, NLOG = 2, LBLKS = 16;
  localparam int BW = 5, PW = 3, LBW = 4;
  localparam int NLPN = LBLKS * NPG;

  logic clk = 0, rst_n = 0, bg = 0;
  logic cmd_valid = 0, cmd_ready, cmd_write = 0;
  logic [LBW+PW-1:0] cmd_lpn = 0;
  logic resp_valid, resp_ok;
  logic [BW+PW-1:0] resp_ppa, nop_src, nop_dst;
  logic nop_valid, nop_done = 0, nop_fail = 0, ready;
  nand_op_e nop;
  logic [20:0] nop_lsa;
  logic [BW:0] free_b, dirty_b, bad_b;
  logic [31:0] c_merge, c_erase, c_log, c_wl, c_gcd;
  int checks = 0, failures = 0;

  nfatl #(.NBLK(NBLK), .NPG(NPG), .NLOG(NLOG), .LBLKS(LBLKS), .GC_THRESH(3),
          .WL_PERIOD(4), .WL_THRESH(3)) dut (
    .clk, .rst_n, .bg_gc_en(bg), .cmd_valid, .cmd_ready, .cmd_write, .cmd_lpn,
    .resp_valid, .resp_ok, .resp_ppa, .nop_valid, .nop, .nop_src, .nop_dst,
    .nop_lsa, .nop_done, .nop_fail, .ready, .free_blocks(free_b),
    .dirty_blocks(dirty_b), .bad_blocks(bad_b), .cnt_merges(c_merge),
    .cnt_erases(c_erase), .cnt_log_writes(c_log), .cnt_wl_moves(c_wl),
    .cnt_gc_demand(c_gcd));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", what, $time); end
  endtask

  // ------------------------------------------------ NAND model
  bit          written [NBLK][NPG];
  int          last_pg [NBLK];
  int          tag     [NBLK][NPG];
  int          lsa     [NBLK][NPG];
  bit          fbad    [NBLK];
  int          n_erase = 0, n_bg_erase = 0;
  int          cur_tag = 0;
  bit          outstanding = 0;   // a host command is in progress
  int          ref_tag [NLPN];

  initial begin
    foreach (fbad[b]) fbad[b] = (b == 5 || b == 17);
    foreach (last_pg[b]) last_pg[b] = -1;
    foreach (ref_tag[i]) ref_tag[i] = 0;
  end

  always @(posedge clk) begin
    nop_done <= 0;
    nop_fail <= 0;
    if (nop_valid && !nop_done) begin
      automatic int sb = int'(nop_src[BW+PW-1:PW]), sp = int'(nop_src[PW-1:0]);
      automatic int db = int'(nop_dst[BW+PW-1:PW]), dp = int'(nop_dst[PW-1:0]);
      repeat (2) @(posedge clk);
      case (nop)
        NOP_CHKBAD: nop_fail <= fbad[sb];
        NOP_PROGRAM, NOP_COPY: begin
          check(!fbad[db], "program on bad block");
          check(!written[db][dp] && dp > last_pg[db], $sformatf("program order blk %0d pg %0d", db, dp));
          written[db][dp] = 1; last_pg[db] = dp;
          if (nop == NOP_PROGRAM) tag[db][dp] = cur_tag;
          else begin
            check(written[sb][sp], "copy of unwritten page");
            tag[db][dp] = tag[sb][sp];
            check(lsa[sb][sp] == int'(nop_lsa), "copy keeps lsa");
          end
          lsa[db][dp] = int'(nop_lsa);
        end
        NOP_ERASE: begin
          check(!fbad[db], "erase of factory bad block");
          n_erase++;
          if (!outstanding) n_bg_erase++;
          if (n_erase == 10) nop_fail <= 1;   // grown bad block
          for (int p = 0; p < NPG; p++) written[db][p] = 0;
          last_pg[db] = -1;
        end
        NOP_READ: ;
        default: check(0, "unknown op");
      endcase
      nop_done <= 1;
    end
  end

  // ------------------------------------------------ host
  task automatic do_cmd(bit wr, int lpn, output bit ok, output int ppa);
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_lpn = (LBW+PW)'(lpn);
    outstanding = 1;
    if (wr) cur_tag++;
    while (!cmd_ready) @(negedge clk);   // accepted at the next rising edge
    @(negedge clk);
    cmd_valid = 0;
    while (!resp_valid) @(negedge clk);
    ok = resp_ok; ppa = int'(resp_ppa);
    outstanding = 0;
  endtask

  task automatic write(int lpn);
    bit ok; int ppa;
    do_cmd(1, lpn, ok, ppa);
    check(ok, $sformatf("write %0d ok", lpn));
    if (ok) ref_tag[lpn] = cur_tag;
  endtask

  task automatic read(int lpn);
    bit ok; int ppa, b, p;
    do_cmd(0, lpn, ok, ppa);
    b = ppa >> PW; p = ppa % NPG;
    if (ref_tag[lpn] == 0) check(!ok, $sformatf("unwritten read %0d", lpn));
    else begin
      check(ok, $sformatf("read %0d found", lpn));
      check(ok && written[b][p] && tag[b][p] == ref_tag[lpn] && lsa[b][p] == lpn,
            $sformatf("read %0d data (tag %0d want %0d)", lpn, tag[b][p], ref_tag[lpn]));
    end
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
    check(bad_b == 2 && free_b == NBLK - 2, "start-up bad block scan");
    // cold data: logical blocks 8..15 written once, sequentially
    for (int l = 8 * NPG; l < NLPN; l++) write(l);
    // hot data: random overwrites in logical blocks 0..3
    for (int i = 0; i < 600; i++) begin
      automatic int l = $urandom_range(4 * NPG - 1);
      write(l);
      if (i % 3 == 0) read($urandom_range(NLPN - 1));
      if (i == 300) bg = 1;
      if (bg && i % 50 == 0) repeat (200) @(negedge clk);  // idle: background GC
    end
    for (int l = 0; l < NLPN; l++) read(l);
    $display("merges=%0d erases=%0d log_writes=%0d wl_moves=%0d gc_demand=%0d bg_erases=%0d bad=%0d",
             c_merge, c_erase, c_log, c_wl, c_gcd, n_bg_erase, bad_b);
    check(c_merge > 0, "merge happened");
    check(c_log > 0, "log writes happened");
    check(c_gcd > 0, "on-demand GC happened");
    check(n_bg_erase > 0, "background GC happened");
    check(c_wl > 0, "static wear levelling happened");
    check(bad_b == 3, "grown bad block recorded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
