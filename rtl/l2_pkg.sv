// l2_pkg: shared sizes, types and code tables of the defect-tolerant L2 cache.
//
// The default geometry is a 1 MB, 8-way, 64-byte-block L2 cache whose blocks are
// split into eight 64-bit subblocks. Every subblock carries a (72,64) Hsiao SEC-DED
// code in the cache core; subblocks with two defective cells are additionally
// protected by a shortened double-error-correcting BCH code over GF(2^7) (14 check
// bits) plus one overall parity bit for triple-error detection. The packages holds
// the GF(2^7) arithmetic, the Hsiao column table and the BCH generator
// polynomial so that encoders and decoders agree by construction.
//
// The cache geometry, subblock size, BCH check-bit count and buffer sizes follow
// the document; the Hsiao construction, the field polynomial x^7+x^3+1 and the
// 32-bit physical address are this design's own choices.
package l2_pkg;

  // ---------------- geometry ----------------
  localparam int unsigned ADDR_W     = 32;          // physical byte address
  localparam int unsigned SUB_BITS   = 64;          // data bits per subblock
  localparam int unsigned NSUB       = 8;           // subblocks per block
  localparam int unsigned LINE_BITS  = SUB_BITS * NSUB;  // 512 = 64 bytes
  localparam int unsigned OFFS_W     = 6;           // byte offset in a 64-byte block
  localparam int unsigned SUB_W      = 3;           // subblock index width
  localparam int unsigned LADDR_W    = ADDR_W - OFFS_W;   // block (line) address

  // ---------------- SEC-DED (72,64) ----------------
  localparam int unsigned SEC_CHK    = 8;
  localparam int unsigned SEC_CW     = SUB_BITS + SEC_CHK;

  typedef logic [SUB_BITS-1:0] sub_t;
  typedef logic [LINE_BITS-1:0] line_t;

  // Hsiao columns of the data bits: the 56 weight-3 bytes in increasing order,
  // then the first 8 weight-5 bytes in increasing order. Built once at
  // elaboration.
  typedef logic [SEC_CHK-1:0] hsiao_tab_t [SUB_BITS];

  function automatic hsiao_tab_t hsiao_table();
    int unsigned n;
    logic [SEC_CHK-1:0] v;
    hsiao_tab_t t;
    n = 0;
    for (int i = 0; i < SUB_BITS; i++) t[i] = '0;
    for (int w = 3; w <= 5; w += 2) begin
      for (int c = 0; c < 256; c++) begin
        v = SEC_CHK'(c);
        if ($countones(v) == w && n < SUB_BITS) begin
          t[n] = v;
          n++;
        end
      end
    end
    return t;
  endfunction

  localparam hsiao_tab_t HSIAO_COL = hsiao_table();

  // ---------------- GF(2^7) and BCH DEC-TED ----------------
  localparam int unsigned GF_M       = 7;
  localparam logic [GF_M:0] GF_POLY  = 8'b1000_1001;   // x^7 + x^3 + 1
  localparam int unsigned BCH_CHK    = 14;             // 2*m check bits (t = 2)
  localparam int unsigned BCH_N      = SUB_BITS + BCH_CHK;   // 78-bit shortened codeword
  localparam logic [BCH_CHK:0] BCH_GEN = 15'h4377;     // m1(x)*m3(x)
  localparam int unsigned MECC_W     = BCH_CHK + 1;    // stored: BCH bits + overall parity

  typedef logic [GF_M-1:0] gf_t;

  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    logic [2*GF_M-2:0] p;
    p = '0;
    for (int i = 0; i < GF_M; i++)
      if (b[i]) p ^= (2*GF_M-1)'(a) << i;
    for (int i = 2*GF_M-2; i >= GF_M; i--)
      if (p[i]) p ^= (2*GF_M-1)'(GF_POLY) << (i - GF_M);
    return p[GF_M-1:0];
  endfunction

  // alpha^k for 0 <= k < 127
  function automatic gf_t gf_pow_alpha(input int unsigned k);
    gf_t r;
    r = gf_t'(1);
    for (int unsigned i = 0; i < k; i++) r = gf_mul(r, gf_t'(2));
    return r;
  endfunction

  // a^-1 = a^(2^7 - 2) = a^2 * a^4 * ... * a^64
  function automatic gf_t gf_inv(input gf_t a);
    gf_t sq, r;
    sq = a;
    r  = gf_t'(1);
    for (int i = 1; i < GF_M; i++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  // ---------------- cache-level types ----------------
  // Physical position of a 64-bit subblock in the L2 array: set, way, subblock.
  typedef enum logic [1:0] {
    CLS_UNKNOWN = 2'd0,
    CLS_PLAIN   = 2'd1,   // g-block or s-block: no multibit ECC
    CLS_MBLOCK  = 2'd2    // at least one m-subblock
  } blk_class_e;

  // One-cycle event strobes reported for statistics and test.
  typedef struct packed {
    logic pbuf_hit;      // read served from the predecoding buffer
    logic flu_hit;       // read classified plain by the FLU buffer
    logic mecc_search;   // M-ECC cache searched
    logic mecc_decode;   // explicit multibit ECC decoding performed
    logic flu_insert;    // location added to the FLU buffer
    logic pbuf_insert;   // decoded block added to the predecoding buffer
    logic dr_hit;        // L1 write-back hit the DR cache
    logic dr_insert;     // L1 write-back added to a free DR entry
    logic dr_evict;      // DR LRU copy written to memory
    logic dr_discard;    // DR copy dropped on a dirty L2 eviction
    logic l2_miss;       // L2 miss
    logic l2_wb;         // dirty L2 victim written to memory
    logic recover_dr;    // uncorrectable block restored from DR cache
    logic recover_mem;   // uncorrectable block restored from memory
  } l2_events_t;

endpackage
