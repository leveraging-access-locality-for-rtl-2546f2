// predecode_buf: predecoding buffer, a small fully associative LRU cache holding
// already-corrected copies of recently read m-blocks (blocks with at least one
// m-subblock).
//
// A read hit returns the stored copy, so neither the M-ECC cache nor the slow
// multibit ECC decoder is needed. Entries are keyed by L2 block location
// {set, way}. Interface: key_i is compared combinationally (hit_o, data_o);
// lookup_i makes a hit entry most recently used; insert_i stores key_i/data_i in
// the hit entry, else a free one, else the LRU one; update_i overwrites the data
// of a hit entry without changing the LRU order (an L2 write to a buffered
// block); flush_i empties the buffer. Writes take effect at the clock edge.
// The 64-block size and LRU replacement follow the document; updating a copy on
// write, the location key and the flush are this design's choices.
module predecode_buf #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned KEY_W   = 14,
  parameter int unsigned DATA_W  = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [KEY_W-1:0]  key_i,
  input  logic              lookup_i,
  input  logic              insert_i,
  input  logic              update_i,
  input  logic              flush_i,
  input  logic [DATA_W-1:0] data_i,
  output logic              hit_o,
  output logic [DATA_W-1:0] data_o
);
  localparam int unsigned IW = $clog2(ENTRIES);
  logic [KEY_W-1:0]  key_q  [ENTRIES];
  logic [DATA_W-1:0] data_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [IW-1:0] hit_idx, free_idx, lru_idx, wr_idx;
  logic          any_free, wr_en;

  always_comb begin
    hit_o    = 1'b0;
    hit_idx  = '0;
    any_free = 1'b0;
    free_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && key_q[i] == key_i) begin
        hit_o   = 1'b1;
        hit_idx = IW'(i);
      end
      if (!valid_q[i] && !any_free) begin
        any_free = 1'b1;
        free_idx = IW'(i);
      end
    end
    data_o = data_q[hit_idx];
    wr_idx = hit_o ? hit_idx : (any_free ? free_idx : lru_idx);
    wr_en  = insert_i || (update_i && hit_o);
  end

  lru_ages #(.N(ENTRIES)) u_lru (
    .clk, .rst_n,
    .touch_i    ((lookup_i && hit_o) || insert_i),
    .touch_idx_i(wr_idx),
    .lru_o      (lru_idx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        valid_q <= '0;
    else if (flush_i)  valid_q <= '0;
    else if (insert_i) valid_q[wr_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      key_q[wr_idx]  <= key_i;
      data_q[wr_idx] <= data_i;
    end
  end
endmodule
