// imm_top: Improved Memory Module (IMM) core. A radiation-tolerant mass
// memory built from a commercial NAND flash: the host writes and reads whole
// 2 KB pages at logical page addresses, and the core hides the flash's
// write-once pages, block erases, bad and wearing blocks and bit errors.
//
// Structure:
//   nfatl      translation layer: logical -> physical mapping with log
//              blocks, allocation with wear levelling, garbage collection,
//              bad-block table. Issues page operations.
//   nand_dma   carries out each page operation on the flash page interface:
//              BCH encoding of the page on program, fault injection and BCH
//              decoding on read, SEC-DED protected logical address and a
//              repetition-coded block-type byte in the spare area, and the
//              host's input/output page buffers (SEC-DED protected).
//   hk_monitor current/temperature thresholds -> automatic power-off request.
//
// Host use (as in the published interface): to write, wait until cmd_ready,
// fill the input buffer through wbuf_*, then issue a write command at a
// logical page. To read, issue a read command, wait for resp_valid (the end
// of the page DMA), then read the page from the output buffer via rbuf_*.
// resp_ok is low for a read of a never-written page or a write that found
// no free block. The SpaceWire/RMAP link, the APB and RS232 test ports and
// the I2C housekeeping sensor are outside this core: their registers appear
// here as plain ports.
//
// Flash side: a page-level interface (see nand_dma) with one operation
// outstanding; the flash device's pin protocol and timing are left to the
// flash interface that connects here.
module imm_top
  import imm_pkg::*;
#(
  parameter int unsigned PAGE_B    = PAGE_BYTES,
  parameter int unsigned NBLK      = NUM_BLOCKS,
  parameter int unsigned NPG       = PAGES_PER_BLOCK,
  parameter int unsigned NLOG      = NUM_LOG_BLOCKS,
  parameter int unsigned LBLKS     = NUM_BLOCKS * 15 / 16,
  parameter int unsigned GC_THRESH = 8,
  parameter int unsigned WL_PERIOD = 64,
  parameter int unsigned WL_THRESH = 1000,
  parameter int unsigned BW        = $clog2(NBLK),
  parameter int unsigned PW        = $clog2(NPG),
  parameter int unsigned LBW       = $clog2(LBLKS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host commands and page buffers
  input  logic                      cmd_valid,
  output logic                      cmd_ready,
  input  logic                      cmd_write,
  input  logic [LBW+PW-1:0]         cmd_lpn,
  output logic                      resp_valid,
  output logic                      resp_ok,
  output logic [4:0]                resp_bit_errors,
  output logic                      resp_uncorrectable,
  output logic                      resp_lsa_error,
  output logic                      resp_lsa_corrected,
  output logic                      resp_table_copy,
  output logic [BW+PW-1:0]          resp_ppa,
  input  logic                      wbuf_en,
  input  logic [$clog2(PAGE_B)-1:0] wbuf_addr,
  input  logic [7:0]                wbuf_data,
  input  logic [$clog2(PAGE_B)-1:0] rbuf_addr,
  output logic [7:0]                rbuf_data,
  // control and status
  input  logic                      bg_gc_en,
  output logic                      ready,
  output logic [BW:0]               free_blocks,
  output logic [BW:0]               dirty_blocks,
  output logic [BW:0]               bad_blocks,
  output logic [31:0]               cnt_merges,
  output logic [31:0]               cnt_erases,
  output logic [31:0]               cnt_log_writes,
  output logic [31:0]               cnt_wl_moves,
  output logic [31:0]               cnt_gc_demand,
  output logic [31:0]               cnt_buf_corrected,
  // fault injector (test port)
  input  fi_mode_e                  fi_mode,
  input  logic [15:0]               fi_err_num,
  input  logic [15:0]               fi_err_rate,
  input  logic [15:0]               fi_err_thresh,
  input  logic                      fi_seed_load,
  input  logic [31:0]               fi_seed,
  output logic [15:0]               fi_inj_count,
  // housekeeping
  input  logic                      hk_sample_valid,
  input  logic [13:0]               hk_current,
  input  logic [13:0]               hk_temperature,
  input  logic [13:0]               hk_current_thr,
  input  logic [13:0]               hk_temp_thr,
  input  logic                      hk_clear,
  output logic                      power_off_req,
  output logic                      hk_over_current,
  output logic                      hk_over_temp,
  // NAND flash page interface
  output logic                      nf_req,
  output nand_op_e                  nf_op,
  output logic [BW+PW-1:0]          nf_addr,
  input  logic                      nf_done,
  input  logic                      nf_fail,
  output logic                      nf_wvalid,
  output logic [7:0]                nf_wdata,
  input  logic                      nf_rvalid,
  input  logic [7:0]                nf_rdata
);
  logic             op_valid, op_done, op_fail;
  nand_op_e         op;
  logic [BW+PW-1:0] op_src, op_dst;
  logic [20:0]      op_lsa;

  nfatl #(
    .NBLK(NBLK), .NPG(NPG), .NLOG(NLOG), .LBLKS(LBLKS), .GC_THRESH(GC_THRESH),
    .WL_PERIOD(WL_PERIOD), .WL_THRESH(WL_THRESH)
  ) u_nfatl (
    .clk, .rst_n, .bg_gc_en,
    .cmd_valid, .cmd_ready, .cmd_write, .cmd_lpn,
    .resp_valid, .resp_ok, .resp_ppa,
    .nop_valid(op_valid), .nop(op), .nop_src(op_src), .nop_dst(op_dst),
    .nop_lsa(op_lsa), .nop_done(op_done), .nop_fail(op_fail),
    .ready, .free_blocks, .dirty_blocks, .bad_blocks,
    .cnt_merges, .cnt_erases, .cnt_log_writes, .cnt_wl_moves, .cnt_gc_demand
  );

  nand_dma #(.PAGE_B(PAGE_B), .AW(BW + PW)) u_dma (
    .clk, .rst_n,
    .op_valid, .op, .op_src, .op_dst, .op_lsa, .op_done, .op_fail,
    .hw_en(wbuf_en), .hw_addr(wbuf_addr), .hw_data(wbuf_data),
    .hr_addr(rbuf_addr), .hr_data(rbuf_data),
    .rd_bit_errors(resp_bit_errors), .rd_uncorrectable(resp_uncorrectable),
    .rd_lsa_corrected(resp_lsa_corrected), .rd_lsa_error(resp_lsa_error),
    .rd_table_copy(resp_table_copy),
    .cnt_buf_corrected,
    .fi_mode, .fi_err_num, .fi_err_rate, .fi_err_thresh, .fi_seed_load,
    .fi_seed, .fi_inj_count,
    .nf_req, .nf_op, .nf_addr, .nf_done, .nf_fail,
    .nf_wvalid, .nf_wdata, .nf_rvalid, .nf_rdata
  );

  hk_monitor #(.ADC_W(14)) u_hk (
    .clk, .rst_n, .sample_valid(hk_sample_valid), .current(hk_current),
    .temperature(hk_temperature), .current_thr(hk_current_thr),
    .temp_thr(hk_temp_thr), .clear_req(hk_clear), .power_off_req,
    .over_current(hk_over_current), .over_temp(hk_over_temp)
  );

endmodule
