// lru_ages: true least-recently-used order for N entries, kept as age counters.
//
// Every entry has a distinct age 0..N-1 (0 = most recently used). Touching entry
// i gives it age 0 and ages by one every entry that was younger than it, so the
// ages stay a permutation. lru_o is the entry whose age is N-1. One touch per
// cycle, applied at the clock edge; lru_o is combinational from the stored ages.
// Reset sets entry i to age i. Used by the predecoding, FLU and DR buffers, whose
// LRU replacement the document specifies; the age-counter realisation is this
// design's choice.
module lru_ages #(
  parameter int unsigned N = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 touch_i,
  input  logic [$clog2(N)-1:0] touch_idx_i,
  output logic [$clog2(N)-1:0] lru_o
);
  localparam int unsigned W = $clog2(N);
  logic [W-1:0] age [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) age[i] <= W'(i);
    end else if (touch_i) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (W'(i) == touch_idx_i)           age[i] <= '0;
        else if (age[i] < age[touch_idx_i]) age[i] <= age[i] + W'(1);
      end
    end
  end

  always_comb begin
    lru_o = '0;
    for (int unsigned i = 0; i < N; i++)
      if (age[i] == W'(N - 1)) lru_o = W'(i);
  end
endmodule
