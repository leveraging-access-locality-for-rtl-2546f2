// flu_buf: fast lookup (FLU) buffer, a small fully associative CAM of L2 block
// locations known to hold no m-subblock (g-blocks and s-blocks).
//
// A hit means the block needs no multibit ECC, so the large M-ECC cache is not
// searched. Entries are L2 block locations {set, way}: the defect map belongs to
// the physical location, so an entry stays true when the block's contents change.
// Interface: key_i is compared combinationally with every valid entry (hit_o);
// lookup_i marks the compare as a real access and makes a hit entry most recently
// used; insert_i writes key_i into a free entry, or into the LRU entry when full,
// at the clock edge; flush_i clears all entries (used when the M-ECC tags are
// reloaded). Size and LRU replacement follow the document (64 entries); keying by
// location and the flush are this design's choices.
module flu_buf #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned KEY_W   = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [KEY_W-1:0] key_i,
  input  logic             lookup_i,
  input  logic             insert_i,
  input  logic             flush_i,
  output logic             hit_o
);
  localparam int unsigned IW = $clog2(ENTRIES);
  logic [KEY_W-1:0] key_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [IW-1:0] hit_idx, free_idx, lru_idx, ins_idx;
  logic          any_free;

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
    ins_idx = any_free ? free_idx : lru_idx;
  end

  lru_ages #(.N(ENTRIES)) u_lru (
    .clk, .rst_n,
    .touch_i    ((lookup_i && hit_o) || (insert_i && !hit_o)),
    .touch_idx_i(hit_o ? hit_idx : ins_idx),
    .lru_o      (lru_idx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (flush_i) begin
      valid_q <= '0;
    end else if (insert_i && !hit_o) begin
      valid_q[ins_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (insert_i && !hit_o) key_q[ins_idx] <= key_i;
  end
endmodule
