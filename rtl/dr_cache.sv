// dr_cache: dirty replication (DR) cache, a small fully associative LRU cache
// inside the L2 that keeps a second copy of the most recent L1 write-backs.
//
// Every dirty L2 block thus has a backup either here or in the next-level memory,
// so a soft error that the in-array code can only detect is still recoverable.
// Operations (at most one per cycle, applied at the clock edge):
//   wb_i       L1 write-back of block addr_i/data_i: a hit updates the copy; a miss
//              fills a free entry or, when full, replaces the LRU entry, whose copy
//              is presented on evict_* in the same cycle for writing to memory;
//   discard_i  a dirty L2 block addr_i was evicted: drop its copy;
//   flush_i    clear all entries.
// hit_o/data_o are the combinational lookup of addr_i (used for recovery).
// The organisation and the whole flow follow the document (64 blocks, LRU); the
// single-cycle operation interface is this design's choice.
module dr_cache #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned ADDR_W  = 26,
  parameter int unsigned DATA_W  = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [DATA_W-1:0] data_i,
  input  logic              wb_i,
  input  logic              discard_i,
  input  logic              flush_i,
  output logic              hit_o,
  output logic [DATA_W-1:0] data_o,
  output logic              evict_o,
  output logic [ADDR_W-1:0] evict_addr_o,
  output logic [DATA_W-1:0] evict_data_o,
  output logic              ev_hit_o,
  output logic              ev_insert_o
);
  localparam int unsigned IW = $clog2(ENTRIES);
  logic [ADDR_W-1:0] tag_q  [ENTRIES];
  logic [DATA_W-1:0] data_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [IW-1:0] hit_idx, free_idx, lru_idx, wr_idx;
  logic          any_free;

  always_comb begin
    hit_o    = 1'b0;
    hit_idx  = '0;
    any_free = 1'b0;
    free_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && tag_q[i] == addr_i) begin
        hit_o   = 1'b1;
        hit_idx = IW'(i);
      end
      if (!valid_q[i] && !any_free) begin
        any_free = 1'b1;
        free_idx = IW'(i);
      end
    end
    data_o       = data_q[hit_idx];
    wr_idx       = hit_o ? hit_idx : (any_free ? free_idx : lru_idx);
    evict_o      = wb_i && !hit_o && !any_free;
    evict_addr_o = tag_q[lru_idx];
    evict_data_o = data_q[lru_idx];
    ev_hit_o     = wb_i && hit_o;
    ev_insert_o  = wb_i && !hit_o && any_free;
  end

  lru_ages #(.N(ENTRIES)) u_lru (
    .clk, .rst_n,
    .touch_i    (wb_i),
    .touch_idx_i(wr_idx),
    .lru_o      (lru_idx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  valid_q <= '0;
    else if (flush_i)            valid_q <= '0;
    else if (wb_i)               valid_q[wr_idx] <= 1'b1;
    else if (discard_i && hit_o) valid_q[hit_idx] <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (wb_i) begin
      tag_q[wr_idx]  <= addr_i;
      data_q[wr_idx] <= data_i;
    end
  end
endmodule
