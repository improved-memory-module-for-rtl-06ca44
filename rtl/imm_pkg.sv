// imm_pkg: constants, types and Galois-field helpers shared by the Improved
// Memory Module (IMM) core.
//
// The NAND geometry (2 KB pages, 128 pages per block, 4096 blocks, 4 log
// blocks) and the BCH code (GF(2^15), t = 15, 225 parity bits over a
// 2048-byte page) follow the published description of the core. The field
// polynomial x^15 + x + 1 is this design's choice: it is primitive and gives
// exactly 225 parity bits for t = 15.
//
// BCH_G is the generator polynomial g(x) of degree 225: the least common
// multiple of the minimal polynomials of alpha^1 .. alpha^30 over GF(2),
// alpha a root of x^15 + x + 1. Bit i holds the coefficient of x^i.
package imm_pkg;

  // ---------------------------------------------------------------- NAND
  localparam int unsigned PAGE_BYTES      = 2048;
  localparam int unsigned PAGES_PER_BLOCK = 128;
  localparam int unsigned NUM_BLOCKS      = 4096;
  localparam int unsigned NUM_LOG_BLOCKS  = 4;

  // ---------------------------------------------------------------- GF(2^15)
  localparam int unsigned GF_M = 15;
  localparam int unsigned GF_N = (1 << GF_M) - 1;   // 32767
  localparam logic [GF_M-1:0] GF_POLY_LOW = 15'h0003; // x^15 = x + 1

  typedef logic [GF_M-1:0] gf_t;

  // ---------------------------------------------------------------- BCH
  localparam int unsigned BCH_T         = 15;
  localparam int unsigned BCH_PAR       = GF_M * BCH_T;             // 225
  localparam int unsigned BCH_PAR_BYTES = (BCH_PAR + 7) / 8;        // 29
  localparam logic [BCH_PAR:0] BCH_G =
    226'h2973f9dc5f35565344f2eab7305ac8525d331eaf877b3653aa4ad76a3;

  // Multiply by x in GF(2^15).
  function automatic gf_t gf_mulx(gf_t a);
    return {a[GF_M-2:0], 1'b0} ^ (a[GF_M-1] ? GF_POLY_LOW : '0);
  endfunction

  // General GF(2^15) multiplier (shift-and-add).
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t r = '0;
    gf_t s = a;
    for (int i = 0; i < GF_M; i++) begin
      if (b[i]) r ^= s;
      s = gf_mulx(s);
    end
    return r;
  endfunction

  // alpha^k for 0 <= k < GF_N (square and multiply).
  function automatic gf_t gf_alpha_pow(int unsigned k);
    gf_t r = gf_t'(1);
    gf_t p = gf_t'(2);
    int unsigned e = k % GF_N;
    while (e != 0) begin
      if (e[0]) r = gf_mul(r, p);
      p = gf_mul(p, p);
      e = e >> 1;
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- NFATL
  // Physical block status kept in the block status table.
  typedef enum logic [2:0] {
    BLK_FREE  = 3'd0,
    BLK_DATA  = 3'd1,
    BLK_LOG   = 3'd2,
    BLK_DIRTY = 3'd3,
    BLK_BAD   = 3'd4,
    BLK_MEM   = 3'd5   // holds the copy of the RAM tables
  } blk_status_e;

  // Page-level operations the translation layer asks of the NAND controller.
  typedef enum logic [2:0] {
    NOP_NONE    = 3'd0,
    NOP_READ    = 3'd1,  // read page  (src)
    NOP_PROGRAM = 3'd2,  // program page (dst) with the host page
    NOP_COPY    = 3'd3,  // copy page src -> dst (data and spare)
    NOP_ERASE   = 3'd4,  // erase block of dst
    NOP_CHKBAD  = 3'd5   // read factory bad-block mark of block of src
  } nand_op_e;

  // Fault-injector modes.
  typedef enum logic [1:0] {
    FI_OFF    = 2'd0,
    FI_COUNT  = 2'd1,  // a programmed number of errors, one every RATE bytes
    FI_RATE   = 2'd2,  // one error every RATE bytes, without end
    FI_RANDOM = 2'd3   // pseudo-random: per byte with probability THRESH/65536
  } fi_mode_e;

endpackage
