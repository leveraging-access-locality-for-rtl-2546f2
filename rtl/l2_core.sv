// l2_core: the conventional L2 cache core: SETS x WAYS blocks of 64 bytes with
// tag, valid and dirty bits, true LRU replacement per set, and a (72,64) SEC-DED
// code on every 64-bit subblock of the data array.
//
// Interface (one operation per cycle, issued by the L2 controller):
//   lookup    combinational: laddr_i (block address) -> hit_o/hit_way_o/hit_dirty_o, and the
//             set's replacement choice vict_way_o (an invalid way first, else LRU)
//             with its valid/dirty bits and block address;
//   rd_i      read block {set of laddr_i, way_i}; one cycle later rd_valid_o and,
//             per subblock, the raw stored data (raw_o), the SEC-DED corrected data
//             (sec_o) and the corrected/uncorrectable flags; the way becomes MRU;
//   wr_i      write block {set of laddr_i, way_i} with wdata_i (check bits encoded
//             here), tag from laddr_i, valid = 1, dirty = dirty_i; the way becomes
//             MRU.
// The data array is the l2_data_sram model. Geometry (1 MB, 8-way, 64-byte
// blocks, eight 64-bit SEC-DED subblocks) follows the document; LRU replacement,
// the tag layout and the operation interface are this design's choices (the
// document gives the cache's 13-cycle latency, which the controller applies).
module l2_core
  import l2_pkg::*;
#(
  parameter int unsigned SETS = 2048,
  parameter int unsigned WAYS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [LADDR_W-1:0]       laddr_i,
  output logic                     hit_o,
  output logic [$clog2(WAYS)-1:0]  hit_way_o,
  output logic                     hit_dirty_o,
  output logic [$clog2(WAYS)-1:0]  vict_way_o,
  output logic                     vict_valid_o,
  output logic                     vict_dirty_o,
  output logic [LADDR_W-1:0]       vict_laddr_o,
  input  logic                     rd_i,
  input  logic                     wr_i,
  input  logic [$clog2(WAYS)-1:0]  way_i,
  input  line_t                    wdata_i,
  input  logic                     dirty_i,
  output logic                     rd_valid_o,
  output line_t                    raw_o,
  output line_t                    sec_o,
  output logic [NSUB-1:0]          sec_corr_o,
  output logic [NSUB-1:0]          sec_uncorr_o
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = LADDR_W - SET_W;
  localparam int unsigned WORD_W = NSUB * SEC_CW;

  logic [SET_W-1:0] set_idx;
  logic [TAG_W-1:0] tag_in;
  assign set_idx = laddr_i[SET_W-1:0];
  assign tag_in  = laddr_i[LADDR_W-1:SET_W];

  logic [TAG_W-1:0]  tag_q   [SETS*WAYS];
  logic [SETS*WAYS-1:0] valid_q, dirty_q;
  logic [WAY_W-1:0]  age_q   [SETS*WAYS];     // per-way LRU age within the set

  // ---------------- lookup ----------------
  logic                   inv_found;
  logic [WAY_W-1:0]       inv_way, lru_way;
  always_comb begin
    hit_o     = 1'b0;
    hit_way_o = '0;
    inv_found = 1'b0;
    inv_way   = '0;
    lru_way   = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (valid_q[{set_idx, WAY_W'(w)}] && tag_q[{set_idx, WAY_W'(w)}] == tag_in) begin
        hit_o     = 1'b1;
        hit_way_o = WAY_W'(w);
      end
      if (!valid_q[{set_idx, WAY_W'(w)}] && !inv_found) begin
        inv_found = 1'b1;
        inv_way   = WAY_W'(w);
      end
      if (age_q[{set_idx, WAY_W'(w)}] == WAY_W'(WAYS - 1)) lru_way = WAY_W'(w);
    end
    hit_dirty_o  = dirty_q[{set_idx, hit_way_o}];
    vict_way_o   = inv_found ? inv_way : lru_way;
    vict_valid_o = valid_q[{set_idx, vict_way_o}];
    vict_dirty_o = dirty_q[{set_idx, vict_way_o}];
    vict_laddr_o = {tag_q[{set_idx, vict_way_o}], set_idx};
  end

  // ---------------- tags, state, LRU ----------------
  logic [SET_W+WAY_W-1:0] blk;
  assign blk = {set_idx, way_i};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      dirty_q <= '0;
      for (int unsigned i = 0; i < SETS*WAYS; i++) age_q[i] <= WAY_W'(i % WAYS);
    end else begin
      if (wr_i) begin
        valid_q[blk] <= 1'b1;
        dirty_q[blk] <= dirty_i;
      end
      if (rd_i || wr_i) begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (WAY_W'(w) == way_i)                    age_q[{set_idx, WAY_W'(w)}] <= '0;
          else if (age_q[{set_idx, WAY_W'(w)}] < age_q[blk])     age_q[{set_idx, WAY_W'(w)}] <= age_q[{set_idx, WAY_W'(w)}] + WAY_W'(1);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_i) tag_q[blk] <= tag_in;
  end

  // ---------------- data array with SEC-DED ----------------
  logic [WORD_W-1:0] wword, rword;
  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    logic [SEC_CHK-1:0] chk;
    secded_enc u_enc (.data_i(wdata_i[s*SUB_BITS +: SUB_BITS]), .chk_o(chk));
    assign wword[s*SEC_CW +: SEC_CW] = {chk, wdata_i[s*SUB_BITS +: SUB_BITS]};
    assign raw_o[s*SUB_BITS +: SUB_BITS] = rword[s*SEC_CW +: SUB_BITS];
    secded_dec u_dec (
      .data_i     (rword[s*SEC_CW +: SUB_BITS]),
      .chk_i      (rword[s*SEC_CW + SUB_BITS +: SEC_CHK]),
      .data_o     (sec_o[s*SUB_BITS +: SUB_BITS]),
      .corrected_o(sec_corr_o[s]),
      .uncorr_o   (sec_uncorr_o[s])
    );
  end

  l2_data_sram #(.WORDS(SETS*WAYS), .WORD_W(WORD_W)) u_data (
    .clk,
    .rd_i   (rd_i),
    .wr_i   (wr_i),
    .addr_i (blk),
    .wdata_i(wword),
    .rdata_o(rword)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid_o <= 1'b0;
    else        rd_valid_o <= rd_i;
  end
endmodule
