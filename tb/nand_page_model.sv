// nand_page_model: behavioural model of a NAND flash seen through the page
// interface of the memory core (not synthesizable). Pages of NB bytes
// (data + spare) are kept in an associative array, so only written pages
// use memory. It checks the flash rules and counts each breach in
// `violations`: programming a page that is not erased, programming pages of
// a block out of ascending order, touching a factory-bad block.
// Factory-bad blocks are BAD_A and BAD_B; the ERASE_FAIL_AT-th erase fails
// (0: never). A read of an erased page returns 0xFF bytes. spare_flip is
// XORed into the first LSA byte and into the marker byte of every page read,
// to exercise the spare-area codes. Latency: LAT cycles per operation; read
// data come one byte per cycle with a one-cycle gap every 500 bytes.
module nand_page_model
  import imm_pkg::*;
#(
  parameter int NBLK = 32,
  parameter int NPG  = 4,
  parameter int AW   = 7,
  parameter int PW   = 2,
  parameter int NB   = 2082,
  parameter int LSA_OFS = NB - 5,
  parameter int LAT  = 4,
  parameter int BAD_A = 3,
  parameter int BAD_B = 20,
  parameter int ERASE_FAIL_AT = 0
) (
  input  logic          clk,
  input  logic          nf_req,
  input  nand_op_e      nf_op,
  input  logic [AW-1:0] nf_addr,
  output logic          nf_done,
  output logic          nf_fail,
  input  logic          nf_wvalid,
  input  logic [7:0]    nf_wdata,
  output logic          nf_rvalid,
  output logic [7:0]    nf_rdata,
  input  logic [7:0]    spare_flip,
  output int            violations,
  output int            n_program,
  output int            n_read,
  output int            n_erase
);
  typedef byte unsigned page_t[];
  page_t mem[int];
  int    last_pg[int];

  initial begin
    nf_done = 0; nf_fail = 0; nf_rvalid = 0; nf_rdata = 0;
    violations = 0; n_program = 0; n_read = 0; n_erase = 0;
    forever begin
      @(posedge clk);
      if (nf_req) begin
        automatic nand_op_e op = nf_op;
        automatic int a = int'(nf_addr);
        automatic int blk = a >> PW, pg = a % NPG;
        automatic bit fail = 0;
        automatic bit bad = (blk == BAD_A || blk == BAD_B);
        case (op)
          NOP_PROGRAM: begin
            automatic page_t buff = new[NB];
            automatic int n = 0;
            while (n < NB) begin
              if (nf_wvalid) begin buff[n] = nf_wdata; n++; end
              if (n < NB) @(posedge clk);
            end
            if (bad || mem.exists(a) || (last_pg.exists(blk) && pg <= last_pg[blk])) begin
              violations++;
              $display("nand model: bad program of block %0d page %0d", blk, pg);
            end
            repeat (LAT) @(posedge clk);
            mem[a] = buff; last_pg[blk] = pg; n_program++;
          end
          NOP_READ: begin
            repeat (LAT) @(posedge clk);
            n_read++;
            for (int i = 0; i < NB; i++) begin
              automatic byte unsigned v = mem.exists(a) ? mem[a][i] : 8'hff;
              if (i == LSA_OFS || i == NB - 1) v ^= spare_flip;
              nf_rvalid <= 1; nf_rdata <= v;
              @(posedge clk);
              if (i % 500 == 499) begin nf_rvalid <= 0; @(posedge clk); end
            end
            nf_rvalid <= 0;
          end
          NOP_ERASE: begin
            if (bad) begin
              violations++;
              $display("nand model: erase of bad block %0d", blk);
            end
            repeat (LAT) @(posedge clk);
            n_erase++;
            fail = (n_erase == ERASE_FAIL_AT);
            for (int p = 0; p < NPG; p++) if (mem.exists(blk * NPG + p)) mem.delete(blk * NPG + p);
            if (last_pg.exists(blk)) last_pg.delete(blk);
          end
          NOP_CHKBAD: begin
            repeat (LAT) @(posedge clk);
            fail = bad;
          end
          default: begin
            violations++;
            $display("nand model: unknown operation %0d", op);
          end
        endcase
        nf_done <= 1; nf_fail <= fail;
        @(posedge clk);
        nf_done <= 0; nf_fail <= 0;
        @(posedge clk);   // the core drops nf_req after nf_done
      end
    end
  end
endmodule
