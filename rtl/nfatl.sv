// nfatl: NAND Flash Address Translation Layer. It turns page writes and
// reads at a logical page address (LPN) into page operations on a NAND
// flash whose pages can only be programmed once after an erase, in
// ascending order inside a block, and whose blocks wear out.
//
// Mapping (hybrid, log-block based). The Block Mapping Table (BMT) maps each
// logical block to a physical data block; page o of a logical block lives at
// page o of its data block. A write whose page lies at or beyond the data
// block's program pointer goes straight there. An overwrite, or any write
// behind the pointer, goes to a log block owned by that logical block
// (NLOG log blocks in all); the Sector Mapping Table (SMT) records, per log
// block and logical page offset, which log page holds the newest copy. When
// a log block is full, or a new one is needed and none is free, the victim's
// logical block is merged: every valid page (newest of log or data block) is
// copied to a fresh block, which becomes the data block, and the old data and
// log blocks become dirty. The logical page address is stored with every
// programmed page (output lsa), as the spare area carries it. A page-valid
// bitmap per block tells written pages from holes left by out-of-order writes.
//
// Allocator / wear leveller. A free block is chosen by scanning the block
// status table for the free block with the fewest erasures (erase-count
// table). Static wear levelling: every WL_PERIOD erasures the layer looks for
// the least-erased data block and the most-erased free block; if their counts
// differ by more than WL_THRESH, the cold data are moved into the worn block
// (a merge into that block), so rarely written data stop pinning young blocks.
//
// Garbage collector. On demand: before an allocation, while the number of
// free blocks is at or below GC_THRESH, dirty blocks are erased. In the
// background: when no command waits, dirty blocks are erased one at a time.
//
// Bad blocks. At start-up every block's factory bad mark is read (NOP_CHKBAD);
// marked blocks enter the status table as bad. A block whose erase fails is
// added as bad and never used again.
//
// Follows the published design: hybrid log-block mapping with BMT and SMT in
// RAM tables, 4096 blocks of 128 pages, 4 log blocks, on-demand and
// background GC with a free-block threshold, a status table with
// free/data/log/dirty/bad states, erase counters used to choose blocks,
// static wear levelling, a bad block table grown at run time. This design's
// own choices: the logical capacity (LBLKS), the thresholds, the victim
// choice (round robin), the direct offset-indexed SMT, and that program
// failures are not handled. Saving and reloading the tables (power off/on)
// is not part of this module.
//
// Interfaces.
//   Host: cmd_valid/cmd_ready handshake with cmd_write and cmd_lpn; one
//   response per command: resp_valid (1 cycle) with resp_ok (write done or
//   read found) and, for reads, the physical page read.
//   NAND: nop_valid holds an operation (nop, nop_src, nop_dst, nop_lsa)
//   stable until nop_done (1 cycle), with nop_fail for a failed erase or a
//   bad-block mark. Physical page address = {block, page}.
// Timing: a direct write takes a few cycles plus the NAND program; every
// block allocation scans the status table, NBLK cycles.
module nfatl
  import imm_pkg::*;
#(
  parameter int unsigned NBLK       = NUM_BLOCKS,
  parameter int unsigned NPG        = PAGES_PER_BLOCK,
  parameter int unsigned NLOG       = NUM_LOG_BLOCKS,
  parameter int unsigned LBLKS      = NUM_BLOCKS * 15 / 16,
  parameter int unsigned GC_THRESH  = 8,
  parameter int unsigned WL_PERIOD  = 64,
  parameter int unsigned WL_THRESH  = 1000,
  parameter int unsigned LSA_W      = 21,
  // derived
  parameter int unsigned BW  = $clog2(NBLK),
  parameter int unsigned PW  = $clog2(NPG),
  parameter int unsigned LBW = $clog2(LBLKS),
  parameter int unsigned SW  = (NLOG > 1) ? $clog2(NLOG) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bg_gc_en,
  // host commands
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_write,
  input  logic [LBW+PW-1:0] cmd_lpn,
  output logic              resp_valid,
  output logic              resp_ok,
  output logic [BW+PW-1:0]  resp_ppa,
  // NAND page operations
  output logic              nop_valid,
  output nand_op_e          nop,
  output logic [BW+PW-1:0]  nop_src,
  output logic [BW+PW-1:0]  nop_dst,
  output logic [LSA_W-1:0]  nop_lsa,
  input  logic              nop_done,
  input  logic              nop_fail,
  // status
  output logic              ready,        // start-up scan finished
  output logic [BW:0]       free_blocks,
  output logic [BW:0]       dirty_blocks,
  output logic [BW:0]       bad_blocks,
  output logic [31:0]       cnt_merges,
  output logic [31:0]       cnt_erases,
  output logic [31:0]       cnt_log_writes,
  output logic [31:0]       cnt_wl_moves,
  output logic [31:0]       cnt_gc_demand
);
  localparam int unsigned EW = 17;   // erase counter: endurance 100,000

  typedef enum logic [4:0] {
    S_INIT, S_IDLE, S_W_MAP, S_W_NEWDATA, S_W_NEWLOG, S_W_PROG,
    S_M_ALLOC, S_M_START, S_M_COPY, S_M_FIN,
    S_ALLOC, S_ALLOC_SCAN, S_GC_SCAN, S_GC_ERASE,
    S_WL_SCAN, S_WL_DECIDE, S_R_MAP, S_R_READ, S_DONE
  } state_e;

  // ---------------------------------------------------------------- tables
  logic [BW-1:0]   bmt      [LBLKS];        // logical -> data block
  logic            bmt_v    [LBLKS];
  blk_status_e     bstat    [NBLK];         // block status table
  logic [EW-1:0]   ecnt     [NBLK];         // erase counts
  logic [PW:0]     pwp      [NBLK];         // next page to program
  logic [NPG-1:0]  pgv      [NBLK];         // pages programmed since erase
  logic [LBW-1:0]  owner    [NBLK];         // logical block of a data block
  logic [PW:0]     smt      [NLOG*NPG];     // {valid, log page} per offset
  logic            lg_v     [NLOG];
  logic [LBW-1:0]  lg_lbn   [NLOG];
  logic [BW-1:0]   lg_pbn   [NLOG];

  state_e          state, alloc_ret, gc_ret;
  logic            cur_write;
  logic [LBW-1:0]  lbn;
  logic [PW-1:0]   off;
  logic [BW-1:0]   idx;            // scan index / init index
  logic            best_v;
  logic [BW-1:0]   best;
  logic [EW-1:0]   best_e;
  logic            alloc_max;      // allocate the most-erased free block
  logic            alloc_ok;
  logic [BW-1:0]   ab;             // allocated block
  logic [BW-1:0]   gc_ptr;
  logic [SW-1:0]   victim;
  logic [SW-1:0]   m_slot;
  logic            m_has_log;
  logic [LBW-1:0]  m_lbn;
  logic [BW-1:0]   m_new;
  logic [PW:0]     m_off;
  logic            w_to_log;
  logic [SW-1:0]   w_slot;
  logic [$clog2(WL_PERIOD+1)-1:0] wl_cnt;
  logic            wl_pending;
  logic            cold_v;
  logic [BW-1:0]   cold;
  logic [EW-1:0]   cold_e, hot_e;
  logic            hot_v;

  // ---------------------------------------------------------------- lookups
  logic            hit;
  logic [SW-1:0]   hit_slot;
  logic            free_slot_v;
  logic [SW-1:0]   free_slot;
  always_comb begin
    hit = 1'b0; hit_slot = '0; free_slot_v = 1'b0; free_slot = '0;
    for (int s = int'(NLOG) - 1; s >= 0; s--) begin
      if (lg_v[s] && lg_lbn[s] == lbn) begin hit = 1'b1; hit_slot = SW'(s); end
      if (!lg_v[s]) begin free_slot_v = 1'b1; free_slot = SW'(s); end
    end
  end

  logic [BW-1:0] dblk;
  assign dblk = bmt[lbn];

  logic [PW:0] smt_hit;      // SMT entry of the current (slot, offset)
  assign smt_hit = smt[int'(hit_slot) * NPG + int'(off)];

  logic [PW:0] m_smt;        // SMT entry for the merge copy loop
  assign m_smt = smt[int'(m_slot) * NPG + int'(m_off[PW-1:0])];

  assign cmd_ready = (state == S_IDLE);
  assign ready     = (state != S_INIT);

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; alloc_ret <= S_IDLE; gc_ret <= S_IDLE;
      cur_write <= 1'b0; lbn <= '0; off <= '0; idx <= '0;
      best_v <= 1'b0; best <= '0; best_e <= '0; alloc_max <= 1'b0;
      alloc_ok <= 1'b0; ab <= '0; gc_ptr <= '0; victim <= '0;
      m_slot <= '0; m_has_log <= 1'b0; m_lbn <= '0; m_new <= '0; m_off <= '0;
      w_to_log <= 1'b0; w_slot <= '0; wl_cnt <= '0; wl_pending <= 1'b0;
      cold_v <= 1'b0; cold <= '0; cold_e <= '0; hot_e <= '0; hot_v <= 1'b0;
      resp_valid <= 1'b0; resp_ok <= 1'b0; resp_ppa <= '0;
      nop_valid <= 1'b0; nop <= NOP_NONE; nop_src <= '0; nop_dst <= '0; nop_lsa <= '0;
      free_blocks <= '0; dirty_blocks <= '0; bad_blocks <= '0;
      cnt_merges <= '0; cnt_erases <= '0; cnt_log_writes <= '0;
      cnt_wl_moves <= '0; cnt_gc_demand <= '0;
      for (int s = 0; s < int'(NLOG); s++) begin
        lg_v[s] <= 1'b0; lg_lbn[s] <= '0; lg_pbn[s] <= '0;
      end
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        // ---------------------------------------------- start-up scan
        S_INIT: begin
          if (!nop_valid) begin
            nop_valid <= 1'b1; nop <= NOP_CHKBAD;
            nop_src <= {idx, PW'(0)}; nop_dst <= {idx, PW'(0)};
          end else if (nop_done) begin
            nop_valid <= 1'b0;
            bstat[idx] <= nop_fail ? BLK_BAD : BLK_FREE;
            ecnt[idx]  <= '0;
            pwp[idx]   <= '0;
            pgv[idx]   <= '0;
            owner[idx] <= '0;
            if (nop_fail) bad_blocks <= bad_blocks + 1'b1;
            else          free_blocks <= free_blocks + 1'b1;
            if (int'(idx) < int'(LBLKS)) bmt_v[idx[LBW-1:0]] <= 1'b0;
            if (int'(idx) < int'(LBLKS)) bmt[idx[LBW-1:0]] <= '0;
            if (int'(idx) < int'(NLOG * NPG)) smt[idx[$clog2(NLOG*NPG)-1:0]] <= '0;
            if (idx == BW'(NBLK - 1)) begin
              idx   <= '0;
              state <= S_IDLE;
            end else idx <= idx + 1'b1;
          end
        end
        // ---------------------------------------------- idle / background
        S_IDLE: begin
          if (cmd_valid) begin
            cur_write <= cmd_write;
            lbn       <= cmd_lpn[LBW+PW-1:PW];
            off       <= cmd_lpn[PW-1:0];
            state     <= cmd_write ? S_W_MAP : S_R_MAP;
          end else if (wl_pending) begin
            wl_pending <= 1'b0;
            idx <= '0; cold_v <= 1'b0; hot_v <= 1'b0;
            state <= S_WL_SCAN;
          end else if (bg_gc_en && dirty_blocks != '0) begin
            gc_ret <= S_IDLE;
            state  <= S_GC_SCAN;
          end
        end
        // ---------------------------------------------- write
        S_W_MAP: begin
          if (!bmt_v[lbn]) begin
            alloc_max <= 1'b0; alloc_ret <= S_W_NEWDATA; state <= S_ALLOC;
          end else if ({1'b0, off} >= pwp[dblk] && !hit) begin
            w_to_log <= 1'b0;
            nop_dst  <= {dblk, off};
            state    <= S_W_PROG;
          end else if ({1'b0, off} >= pwp[dblk] && hit && !smt_hit[PW]) begin
            // never written in either block: the data block can take it
            w_to_log <= 1'b0;
            nop_dst  <= {dblk, off};
            state    <= S_W_PROG;
          end else if (hit && pwp[lg_pbn[hit_slot]] != (PW+1)'(NPG)) begin
            w_to_log <= 1'b1; w_slot <= hit_slot;
            nop_dst  <= {lg_pbn[hit_slot], pwp[lg_pbn[hit_slot]][PW-1:0]};
            state    <= S_W_PROG;
          end else if (hit) begin
            m_slot <= hit_slot; m_has_log <= 1'b1; m_lbn <= lbn;
            alloc_max <= 1'b0;
            state  <= S_M_ALLOC;
          end else if (free_slot_v) begin
            w_slot <= free_slot;
            alloc_max <= 1'b0; alloc_ret <= S_W_NEWLOG; state <= S_ALLOC;
          end else begin
            m_slot <= victim; m_has_log <= 1'b1; m_lbn <= lg_lbn[victim];
            victim <= (victim == SW'(NLOG - 1)) ? '0 : victim + 1'b1;
            alloc_max <= 1'b0;
            state  <= S_M_ALLOC;
          end
        end
        S_W_NEWDATA: begin
          if (!alloc_ok) begin
            resp_ok <= 1'b0; state <= S_DONE;
          end else begin
            bstat[ab] <= BLK_DATA; owner[ab] <= lbn;
            bmt[lbn] <= ab; bmt_v[lbn] <= 1'b1;
            state <= S_W_MAP;
          end
        end
        S_W_NEWLOG: begin
          if (!alloc_ok) begin
            resp_ok <= 1'b0; state <= S_DONE;
          end else begin
            bstat[ab] <= BLK_LOG;
            lg_v[w_slot] <= 1'b1; lg_lbn[w_slot] <= lbn; lg_pbn[w_slot] <= ab;
            state <= S_W_MAP;
          end
        end
        S_W_PROG: begin
          if (!nop_valid) begin
            nop_valid <= 1'b1; nop <= NOP_PROGRAM;
            nop_src   <= nop_dst;
            nop_lsa   <= LSA_W'({lbn, off});
          end else if (nop_done) begin
            nop_valid <= 1'b0;
            pwp[nop_dst[BW+PW-1:PW]] <= {1'b0, nop_dst[PW-1:0]} + 1'b1;
            pgv[nop_dst[BW+PW-1:PW]] <= pgv[nop_dst[BW+PW-1:PW]] | (NPG'(1) << nop_dst[PW-1:0]);
            if (w_to_log) begin
              smt[int'(w_slot) * NPG + int'(off)] <= {1'b1, nop_dst[PW-1:0]};
              cnt_log_writes <= cnt_log_writes + 1'b1;
            end
            resp_ok  <= 1'b1;
            resp_ppa <= nop_dst;
            state    <= S_DONE;
          end
        end
        // ---------------------------------------------- merge / migration
        S_M_ALLOC: begin
          alloc_ret <= S_M_START; state <= S_ALLOC;
        end
        S_M_START: begin
          if (!alloc_ok) begin
            resp_ok <= 1'b0; state <= cur_write ? S_DONE : S_IDLE;
          end else begin
            m_new <= ab; m_off <= '0;
            bstat[ab] <= BLK_DATA; owner[ab] <= m_lbn;
            state <= S_M_COPY;
          end
        end
        S_M_COPY: begin
          if (m_off == (PW+1)'(NPG)) begin
            state <= S_M_FIN;
          end else if (!nop_valid) begin
            if (m_has_log && m_smt[PW]) begin
              nop_valid <= 1'b1; nop <= NOP_COPY;
              nop_src <= {lg_pbn[m_slot], m_smt[PW-1:0]};
              nop_dst <= {m_new, m_off[PW-1:0]};
              nop_lsa <= LSA_W'({m_lbn, m_off[PW-1:0]});
            end else if (pgv[bmt[m_lbn]][m_off[PW-1:0]]) begin
              nop_valid <= 1'b1; nop <= NOP_COPY;
              nop_src <= {bmt[m_lbn], m_off[PW-1:0]};
              nop_dst <= {m_new, m_off[PW-1:0]};
              nop_lsa <= LSA_W'({m_lbn, m_off[PW-1:0]});
            end else begin
              m_off <= m_off + 1'b1;   // page never written
            end
          end else if (nop_done) begin
            nop_valid <= 1'b0;
            pwp[m_new] <= m_off + 1'b1;
            pgv[m_new] <= pgv[m_new] | (NPG'(1) << m_off[PW-1:0]);
            if (m_has_log) smt[int'(m_slot) * NPG + int'(m_off[PW-1:0])] <= '0;
            m_off <= m_off + 1'b1;
          end
        end
        S_M_FIN: begin
          bstat[bmt[m_lbn]] <= BLK_DIRTY;
          if (m_has_log) begin
            bstat[lg_pbn[m_slot]] <= BLK_DIRTY;
            lg_v[m_slot] <= 1'b0;
            dirty_blocks <= dirty_blocks + (BW+1)'(2);
            cnt_merges   <= cnt_merges + 1'b1;
          end else begin
            dirty_blocks <= dirty_blocks + 1'b1;
          end
          bmt[m_lbn] <= m_new;
          state <= cur_write ? S_W_MAP : S_IDLE;
        end
        // ---------------------------------------------- allocator
        S_ALLOC: begin
          if ({1'b0, free_blocks} <= (BW+2)'(GC_THRESH) && dirty_blocks != '0) begin
            gc_ret <= S_ALLOC; state <= S_GC_SCAN;
            cnt_gc_demand <= cnt_gc_demand + 1'b1;
          end else if (free_blocks == '0) begin
            alloc_ok <= 1'b0; state <= alloc_ret;
          end else begin
            idx <= '0; best_v <= 1'b0; state <= S_ALLOC_SCAN;
          end
        end
        S_ALLOC_SCAN: begin
          if (bstat[idx] == BLK_FREE &&
              (!best_v || (alloc_max ? ecnt[idx] > best_e : ecnt[idx] < best_e))) begin
            best_v <= 1'b1; best <= idx; best_e <= ecnt[idx];
          end
          if (idx == BW'(NBLK - 1)) begin
            // the last index is folded in here
            if (bstat[idx] == BLK_FREE &&
                (!best_v || (alloc_max ? ecnt[idx] > best_e : ecnt[idx] < best_e)))
              ab <= idx;
            else
              ab <= best;
            alloc_ok    <= 1'b1;
            free_blocks <= free_blocks - 1'b1;
            state       <= alloc_ret;
          end else idx <= idx + 1'b1;
        end
        // ---------------------------------------------- garbage collector
        S_GC_SCAN: begin
          if (bstat[gc_ptr] == BLK_DIRTY) begin
            state <= S_GC_ERASE;
          end else begin
            gc_ptr <= (gc_ptr == BW'(NBLK - 1)) ? '0 : gc_ptr + 1'b1;
          end
        end
        S_GC_ERASE: begin
          if (!nop_valid) begin
            nop_valid <= 1'b1; nop <= NOP_ERASE;
            nop_src <= {gc_ptr, PW'(0)}; nop_dst <= {gc_ptr, PW'(0)};
          end else if (nop_done) begin
            nop_valid    <= 1'b0;
            dirty_blocks <= dirty_blocks - 1'b1;
            if (nop_fail) begin
              bstat[gc_ptr] <= BLK_BAD;
              bad_blocks    <= bad_blocks + 1'b1;
            end else begin
              bstat[gc_ptr] <= BLK_FREE;
              ecnt[gc_ptr]  <= ecnt[gc_ptr] + 1'b1;
              pwp[gc_ptr]   <= '0;
              pgv[gc_ptr]   <= '0;
              free_blocks   <= free_blocks + 1'b1;
              cnt_erases    <= cnt_erases + 1'b1;
              if (wl_cnt == ($clog2(WL_PERIOD+1))'(WL_PERIOD - 1)) begin
                wl_cnt <= '0; wl_pending <= 1'b1;
              end else wl_cnt <= wl_cnt + 1'b1;
            end
            state <= gc_ret;
          end
        end
        // ---------------------------------------------- static wear levelling
        S_WL_SCAN: begin
          if (bstat[idx] == BLK_DATA && (!cold_v || ecnt[idx] < cold_e)) begin
            cold_v <= 1'b1; cold <= idx; cold_e <= ecnt[idx];
          end
          if (bstat[idx] == BLK_FREE && (!hot_v || ecnt[idx] > hot_e)) begin
            hot_v <= 1'b1; hot_e <= ecnt[idx];
          end
          if (idx == BW'(NBLK - 1)) state <= S_WL_DECIDE;
          else idx <= idx + 1'b1;
        end
        S_WL_DECIDE: begin
          if (cold_v && hot_v && hot_e > cold_e + EW'(WL_THRESH)) begin
            // move the cold logical block into the most-worn free block
            m_lbn     <= owner[cold];
            m_has_log <= 1'b0;
            for (int s = 0; s < int'(NLOG); s++)
              if (lg_v[s] && lg_lbn[s] == owner[cold]) begin
                m_has_log <= 1'b1; m_slot <= SW'(s);
              end
            cur_write <= 1'b0;
            alloc_max <= 1'b1;
            cnt_wl_moves <= cnt_wl_moves + 1'b1;
            state     <= S_M_ALLOC;
          end else state <= S_IDLE;
        end
        // ---------------------------------------------- read
        S_R_MAP: begin
          if (!bmt_v[lbn]) begin
            resp_ok <= 1'b0; resp_ppa <= '0; state <= S_DONE;
          end else if (hit && smt_hit[PW]) begin
            nop_src <= {lg_pbn[hit_slot], smt_hit[PW-1:0]};
            state   <= S_R_READ;
          end else if (pgv[dblk][off]) begin
            nop_src <= {dblk, off};
            state   <= S_R_READ;
          end else begin
            resp_ok <= 1'b0; resp_ppa <= '0; state <= S_DONE;
          end
        end
        S_R_READ: begin
          if (!nop_valid) begin
            nop_valid <= 1'b1; nop <= NOP_READ; nop_dst <= nop_src;
            nop_lsa   <= LSA_W'({lbn, off});
          end else if (nop_done) begin
            nop_valid <= 1'b0;
            resp_ok   <= 1'b1;
            resp_ppa  <= nop_src;
            state     <= S_DONE;
          end
        end
        S_DONE: begin
          resp_valid <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (NLOG * NPG <= NBLK && LBLKS + NLOG < NBLK)
      else $error("nfatl: inconsistent geometry");
  end

  // a NAND operation is held stable until it completes
  property p_nop_stable;
    @(posedge clk) disable iff (!rst_n)
      nop_valid && !nop_done |=> nop_valid && $stable(nop) && $stable(nop_src) && $stable(nop_dst);
  endproperty
  assert property (p_nop_stable);

endmodule
