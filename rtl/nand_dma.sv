// nand_dma: the DMA engine between the translation layer (nfatl) and the
// NAND flash page interface. It carries out one page operation at a time and
// owns the host's two page buffers: the input buffer the host fills before a
// write, and the output buffer a read delivers into.
//
// Page layout on flash (2082 bytes, this design's arrangement of the spare
// area): 2048 data bytes, 29 BCH parity bytes, 4 bytes of SEC-DED protected
// logical sector address, 1 block-type byte (7-fold repetition code).
//
//   PROGRAM: input buffer -> bch_encoder -> flash, then LSA and marker bytes.
//   READ   : flash -> fault_injector -> bch_decoder -> output buffer; the LSA
//            bytes go through the SEC-DED decoder, the marker byte through
//            the majority decoder. The decoded LSA is compared with the one
//            the translation layer expects.
//   COPY   : a READ of the source page into the output buffer, then a
//            PROGRAM of the destination from the output buffer, so merged
//            pages are rewritten with their bit errors corrected.
//   ERASE, CHKBAD: passed to the flash; its fail flag is returned.
// Both page buffers hold SEC-DED code words (8 data + 5 check bits), the
// protection the published design gives its internal block RAMs; a single
// bit error in a buffer word is corrected when the word is read.
//
// The codecs and the fault injector are the published design's; the page
// layout, the buffer protection placement and the flash-side handshake are
// this design's.
//
// Flash page interface: nf_req is held with nf_op and nf_addr until nf_done
// (one cycle, with nf_fail). For PROGRAM the engine sends the 2082 bytes on
// nf_wvalid/nf_wdata on consecutive cycles right after raising nf_req; for
// READ the flash sends 2082 bytes on nf_rvalid/nf_rdata at any pace, then
// nf_done. Operation side: op_valid is held by the requester until op_done.
module nand_dma
  import imm_pkg::*;
#(
  parameter int unsigned PAGE_B = PAGE_BYTES,
  parameter int unsigned AW     = 19,          // physical page address width
  parameter int unsigned LSA_W  = 21
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // operation from the translation layer
  input  logic                      op_valid,
  input  nand_op_e                  op,
  input  logic [AW-1:0]             op_src,
  input  logic [AW-1:0]             op_dst,
  input  logic [LSA_W-1:0]          op_lsa,
  output logic                      op_done,
  output logic                      op_fail,
  // host buffers
  input  logic                      hw_en,
  input  logic [$clog2(PAGE_B)-1:0] hw_addr,
  input  logic [7:0]                hw_data,
  input  logic [$clog2(PAGE_B)-1:0] hr_addr,
  output logic [7:0]                hr_data,
  // result of the last page read
  output logic [4:0]                rd_bit_errors,
  output logic                      rd_uncorrectable,
  output logic                      rd_lsa_corrected,
  output logic                      rd_lsa_error,       // unreadable or wrong LSA
  output logic                      rd_table_copy,
  output logic [31:0]               cnt_buf_corrected,
  // fault injector control
  input  fi_mode_e                  fi_mode,
  input  logic [15:0]               fi_err_num,
  input  logic [15:0]               fi_err_rate,
  input  logic [15:0]               fi_err_thresh,
  input  logic                      fi_seed_load,
  input  logic [31:0]               fi_seed,
  output logic [15:0]               fi_inj_count,
  // NAND flash page interface
  output logic                      nf_req,
  output nand_op_e                  nf_op,
  output logic [AW-1:0]             nf_addr,
  input  logic                      nf_done,
  input  logic                      nf_fail,
  output logic                      nf_wvalid,
  output logic [7:0]                nf_wdata,
  input  logic                      nf_rvalid,
  input  logic [7:0]                nf_rdata
);
  localparam int unsigned CWB    = PAGE_B + BCH_PAR_BYTES;  // BCH code word
  localparam int unsigned NB     = CWB + 4 + 1;             // whole page
  localparam int unsigned CW     = $clog2(NB + 1);
  localparam int unsigned BA     = $clog2(PAGE_B);

  typedef enum logic [3:0] {
    D_IDLE, D_SIMPLE, D_PROG_REQ, D_PROG_STREAM, D_PROG_WAIT,
    D_READ_REQ, D_READ_STREAM, D_READ_CHECK, D_DONE
  } dstate_e;
  dstate_e state;

  logic          is_copy;
  logic          from_out;       // program from the output buffer
  logic [CW-1:0] cnt;            // byte counter of the page transfer
  logic [BA:0]   ocnt;           // decoded bytes stored
  logic          dec_fin, nf_fin;
  logic [31:0]   lsa_raw;
  logic [7:0]    marker_raw;

  // ------------------------------------------------ protected page buffers
  logic [12:0] in_buf  [PAGE_B];
  logic [12:0] out_buf [PAGE_B];

  logic [12:0] hw_cw, dec_cw_wr;
  logic [7:0]  dec_byte;
  logic        dec_valid;
  secded_codec #(.DATA_W(8), .CHECK_W(5)) u_in_enc (
    .enc_data(hw_data), .enc_cw(hw_cw), .dec_cw('0), .dec_data(),
    .dec_corrected(), .dec_uncorrectable());
  secded_codec #(.DATA_W(8), .CHECK_W(5)) u_out_enc (
    .enc_data(dec_byte), .enc_cw(dec_cw_wr), .dec_cw('0), .dec_data(),
    .dec_corrected(), .dec_uncorrectable());

  // program source: input or output buffer, read at the byte counter
  logic [BA-1:0] src_addr;
  logic [7:0]    src_byte;
  logic          src_corr;
  assign src_addr = cnt[BA-1:0];
  secded_codec #(.DATA_W(8), .CHECK_W(5)) u_src_dec (
    .enc_data('0), .enc_cw(),
    .dec_cw(from_out ? out_buf[src_addr] : in_buf[src_addr]),
    .dec_data(src_byte), .dec_corrected(src_corr), .dec_uncorrectable());

  // host read port of the output buffer
  secded_codec #(.DATA_W(8), .CHECK_W(5)) u_host_dec (
    .enc_data('0), .enc_cw(), .dec_cw(out_buf[hr_addr]),
    .dec_data(hr_data), .dec_corrected(), .dec_uncorrectable());

  always_ff @(posedge clk) begin
    if (hw_en) in_buf[hw_addr] <= hw_cw;
    if (dec_valid) out_buf[ocnt[BA-1:0]] <= dec_cw_wr;
  end

  // ------------------------------------------------ encoder (write path)
  logic       enc_start, enc_in_valid, enc_in_ready, enc_out_valid, enc_last;
  logic [7:0] enc_out;
  assign enc_start    = (state == D_PROG_REQ);
  assign enc_in_valid = (state == D_PROG_STREAM) && (cnt < CW'(PAGE_B));
  bch_encoder #(.PAGE_B(PAGE_B)) u_enc (
    .clk, .rst_n, .start(enc_start), .in_valid(enc_in_valid), .in_data(src_byte),
    .in_ready(enc_in_ready), .out_valid(enc_out_valid), .out_data(enc_out),
    .last(enc_last));

  // spare-area encoders
  logic [31:0] lsa_wr;
  logic [LSA_W-1:0] lsa_rd;
  logic        lsa_corr, lsa_unc;
  lsa_codec #(.LSA_W(LSA_W)) u_lsa (
    .lsa(op_lsa), .spare_wr(lsa_wr), .spare_rd(lsa_raw), .lsa_out(lsa_rd),
    .corrected(lsa_corr), .uncorrectable(lsa_unc));

  logic [7:0] marker_wr;
  logic       marker_bit, marker_copy;
  logic [1:0] marker_errs;
  majority_codec u_marker (
    .bit_in(1'b1), .byte_out(marker_wr), .byte_in(marker_raw),
    .bit_out(marker_bit), .is_table_copy(marker_copy), .err_count(marker_errs));

  // ------------------------------------------------ read path
  logic       fi_valid;
  logic [7:0] fi_out;
  logic       fi_inject;
  assign fi_valid = (state == D_READ_STREAM) && nf_rvalid && (cnt < CW'(CWB));
  fault_injector u_fi (
    .clk, .rst_n, .mode(fi_mode), .err_num(fi_err_num), .err_rate(fi_err_rate),
    .err_thresh(fi_err_thresh), .seed_load(fi_seed_load), .seed(fi_seed),
    .page_start(state == D_READ_REQ), .data_valid(fi_valid), .data_in(nf_rdata),
    .data_out(fi_out), .inject(fi_inject), .inj_count(fi_inj_count));

  logic       dec_in_ready, dec_done, dec_unc;
  logic [4:0] dec_errs;
  bch_decoder #(.PAGE_B(PAGE_B)) u_dec (
    .clk, .rst_n, .in_valid(fi_valid), .in_data(fi_out), .in_ready(dec_in_ready),
    .out_valid(dec_valid), .out_data(dec_byte), .done(dec_done),
    .err_count(dec_errs), .uncorrectable(dec_unc));

  // ------------------------------------------------ write stream mux
  always_comb begin
    nf_wvalid = 1'b0;
    nf_wdata  = '0;
    if (state == D_PROG_STREAM) begin
      nf_wvalid = 1'b1;
      if (cnt < CW'(CWB))          nf_wdata = enc_out;
      else if (cnt < CW'(CWB + 4)) nf_wdata = lsa_wr[8*(int'(cnt) - int'(CWB)) +: 8];
      else                         nf_wdata = marker_wr;
    end
  end

  // ------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE; is_copy <= 1'b0; from_out <= 1'b0; cnt <= '0; ocnt <= '0;
      dec_fin <= 1'b0; nf_fin <= 1'b0; lsa_raw <= '0; marker_raw <= '0;
      op_done <= 1'b0; op_fail <= 1'b0;
      nf_req <= 1'b0; nf_op <= NOP_NONE; nf_addr <= '0;
      rd_bit_errors <= '0; rd_uncorrectable <= 1'b0; rd_lsa_corrected <= 1'b0;
      rd_lsa_error <= 1'b0; rd_table_copy <= 1'b0; cnt_buf_corrected <= '0;
    end else begin
      op_done <= 1'b0;
      if (state == D_PROG_STREAM && cnt < CW'(PAGE_B) && src_corr)
        cnt_buf_corrected <= cnt_buf_corrected + 1'b1;
      unique case (state)
        D_IDLE: if (op_valid && !op_done) begin
          op_fail <= 1'b0;
          unique case (op)
            NOP_ERASE, NOP_CHKBAD: begin
              nf_req <= 1'b1; nf_op <= op;
              nf_addr <= (op == NOP_ERASE) ? op_dst : op_src;
              state <= D_SIMPLE;
            end
            NOP_PROGRAM: begin
              from_out <= 1'b0; is_copy <= 1'b0; state <= D_PROG_REQ;
            end
            NOP_READ: begin
              is_copy <= 1'b0; state <= D_READ_REQ;
            end
            NOP_COPY: begin
              is_copy <= 1'b1; state <= D_READ_REQ;
            end
            default: begin
              op_done <= 1'b1; op_fail <= 1'b1;
            end
          endcase
        end
        D_SIMPLE: if (nf_done) begin
          nf_req <= 1'b0; op_fail <= nf_fail; state <= D_DONE;
        end
        D_PROG_REQ: begin
          nf_req <= 1'b1; nf_op <= NOP_PROGRAM; nf_addr <= op_dst;
          cnt <= '0; state <= D_PROG_STREAM;
        end
        D_PROG_STREAM: begin
          if (cnt == CW'(NB - 1)) state <= D_PROG_WAIT;
          cnt <= cnt + 1'b1;
        end
        D_PROG_WAIT: if (nf_done) begin
          nf_req <= 1'b0; op_fail <= nf_fail; state <= D_DONE;
        end
        D_READ_REQ: begin
          nf_req <= 1'b1; nf_op <= NOP_READ; nf_addr <= op_src;
          cnt <= '0; ocnt <= '0; dec_fin <= 1'b0; nf_fin <= 1'b0;
          state <= D_READ_STREAM;
        end
        D_READ_STREAM: begin
          if (nf_rvalid && cnt < CW'(NB)) begin
            if (cnt >= CW'(CWB) && cnt < CW'(CWB + 4))
              lsa_raw[8*(int'(cnt) - int'(CWB)) +: 8] <= nf_rdata;
            if (cnt == CW'(NB - 1)) marker_raw <= nf_rdata;
            cnt <= cnt + 1'b1;
          end
          if (dec_valid) ocnt <= ocnt + 1'b1;
          if (dec_done) begin
            dec_fin          <= 1'b1;
            rd_bit_errors    <= dec_errs;
            rd_uncorrectable <= dec_unc;
          end
          if (nf_done) begin
            nf_fin <= 1'b1;
            nf_req <= 1'b0;
          end
          if ((dec_fin || dec_done) && (nf_fin || nf_done)) state <= D_READ_CHECK;
        end
        D_READ_CHECK: begin
          rd_lsa_corrected <= lsa_corr;
          rd_lsa_error     <= lsa_unc || (lsa_rd != op_lsa);
          rd_table_copy    <= marker_copy;
          if (is_copy) begin
            from_out <= 1'b1; state <= D_PROG_REQ;
          end else state <= D_DONE;
        end
        D_DONE: begin
          op_done <= 1'b1;
          state   <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // the flash must not send more than a page, nor send while not reading
  assert property (@(posedge clk) disable iff (!rst_n)
                   nf_rvalid |-> state == D_READ_STREAM && cnt < CW'(NB));
  // the decoder is ready for every code word byte the flash delivers
  assert property (@(posedge clk) disable iff (!rst_n) fi_valid |-> dec_in_ready);

endmodule
