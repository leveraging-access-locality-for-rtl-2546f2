// mecc_cache: fully associative M-ECC cache. Each entry is tagged by the location
// {set, way, subblock} of one m-subblock (a 64-bit subblock with two defective
// cells) and stores that subblock's multibit ECC check bits.
//
// The tags come from outside (non-volatile memory or a built-in self-test) through
// the cfg_* port, one entry per cycle; cfg_valid_i = 0 frees an entry. A search
// compares the block location blk_i {set, way} with all valid tags at once and, at
// the next clock edge, registers for each of the block's subblocks whether it is
// an m-subblock (hit_o) and its stored check bits (chk_o). A following wr_i writes
// wr_chk_i into the entries of the subblocks selected by wr_mask_i among those
// found by the last search. Timing: search in cycle t, result from cycle t+1.
// Entry count (16 KB of 2-byte check-bit entries = 8192) and the per-tag valid bit
// follow the document; the load port and two-step search/write are this design's.
module mecc_cache
  import l2_pkg::*;
#(
  parameter int unsigned ENTRIES = 8192,
  parameter int unsigned BLK_W   = 14          // {set, way} width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // tag load (from non-volatile memory / BIST)
  input  logic                      cfg_we_i,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx_i,
  input  logic                      cfg_valid_i,
  input  logic [BLK_W+SUB_W-1:0]    cfg_loc_i,
  // search
  input  logic                      search_i,
  input  logic [BLK_W-1:0]          blk_i,
  output logic [NSUB-1:0]           hit_o,
  output logic [MECC_W-1:0]         chk_o [NSUB],
  // check-bit write for the last searched block
  input  logic                      wr_i,
  input  logic [NSUB-1:0]           wr_mask_i,
  input  logic [MECC_W-1:0]         wr_chk_i [NSUB]
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [BLK_W+SUB_W-1:0] tag_q [ENTRIES];
  logic [ENTRIES-1:0]     valid_q;
  logic [MECC_W-1:0]      chk_q [ENTRIES];

  logic [NSUB-1:0] match;
  logic [IW-1:0]   match_idx [NSUB];
  logic [IW-1:0]   idx_q     [NSUB];

  always_comb begin
    match = '0;
    for (int unsigned s = 0; s < NSUB; s++) match_idx[s] = '0;
    for (int unsigned e = 0; e < ENTRIES; e++) begin
      if (valid_q[e] && tag_q[e][BLK_W+SUB_W-1:SUB_W] == blk_i) begin
        match[tag_q[e][SUB_W-1:0]]     = 1'b1;
        match_idx[tag_q[e][SUB_W-1:0]] = IW'(e);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      hit_o   <= '0;
    end else begin
      if (cfg_we_i) valid_q[cfg_idx_i] <= cfg_valid_i;
      if (search_i) hit_o <= match;
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we_i) tag_q[cfg_idx_i] <= cfg_loc_i;
    if (search_i) begin
      for (int unsigned s = 0; s < NSUB; s++) begin
        idx_q[s] <= match_idx[s];
        chk_o[s] <= chk_q[match_idx[s]];
      end
    end
    if (wr_i) begin
      for (int unsigned s = 0; s < NSUB; s++)
        if (wr_mask_i[s] && hit_o[s]) chk_q[idx_q[s]] <= wr_chk_i[s];
    end
  end
endmodule
