// mecc_core: the multibit ECC core. It holds the M-ECC cache, one DEC-TED BCH
// encoder and decoder per subblock lane, the predecoding buffer and the fast
// lookup (FLU) buffer, and runs their operation flow for each L2 block access.
//
// Read of block location blk_i (raw and SEC-DED corrected data from the core):
//   1. predecoding buffer hit  -> return its corrected copy (1 cycle);
//   2. else FLU hit            -> the block has no m-subblock: return the SEC-DED
//                                 result (1 cycle);
//   3. else search the M-ECC cache (1 cycle). No m-subblock: record the location
//      in the FLU buffer and return the SEC-DED result. Otherwise decode every
//      m-subblock with its stored check bits (82 cycles, all lanes in parallel),
//      merge with the SEC-DED result of the other subblocks, keep the corrected
//      block in the predecoding buffer and return it.
// Write of block wdata_i to blk_i: a buffered copy in the predecoding buffer is
// updated; unless the FLU buffer proves the block plain, the M-ECC cache is
// searched and new check bits are encoded and written for its m-subblocks (a plain
// result is recorded in the FLU buffer).
// Handshake: rd_i or wr_i for one cycle while idle (ready_o); done_o pulses with
// data_o, uncorr_o (some subblock had more errors than its code corrects) and
// decoded_o (explicit multibit decoding took place). Loading an M-ECC tag through
// cfg_* empties both small buffers, whose contents may depend on the tags.
// The flow follows the document's description of the M-ECC core; decoding the
// m-subblocks of one block in parallel lanes and the buffer flush on tag reload
// are this design's choices.
module mecc_core
  import l2_pkg::*;
#(
  parameter int unsigned MECC_ENTRIES = 8192,
  parameter int unsigned PBUF_ENTRIES = 64,
  parameter int unsigned FLU_ENTRIES  = 64,
  parameter int unsigned BLK_W        = 14
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           cfg_we_i,
  input  logic [$clog2(MECC_ENTRIES)-1:0] cfg_idx_i,
  input  logic                           cfg_valid_i,
  input  logic [BLK_W+SUB_W-1:0]         cfg_loc_i,
  output logic                           ready_o,
  input  logic                           rd_i,
  input  logic                           wr_i,
  input  logic [BLK_W-1:0]               blk_i,
  input  line_t                          raw_i,
  input  line_t                          sec_i,
  input  logic [NSUB-1:0]                sec_uncorr_i,
  input  line_t                          wdata_i,
  output logic                           done_o,
  output line_t                          data_o,
  output logic                           uncorr_o,
  output logic                           decoded_o,
  output logic                           ev_pbuf_hit_o,
  output logic                           ev_flu_hit_o,
  output logic                           ev_search_o,
  output logic                           ev_decode_o,
  output logic                           ev_flu_insert_o,
  output logic                           ev_pbuf_insert_o
);
  typedef enum logic [2:0] {IDLE, RD_SRCH, DEC, WR_SRCH} state_e;
  state_e state;

  logic [BLK_W-1:0] blk_q;
  line_t            raw_q, sec_q, wdata_q;
  logic [NSUB-1:0]  sec_unc_q;
  logic [NSUB-1:0]  dec_mask;

  // ---------------- small buffers ----------------
  logic [BLK_W-1:0] key;
  logic  pbuf_hit, flu_hit, pbuf_lookup, pbuf_insert, pbuf_update, flu_lookup, flu_insert;
  line_t pbuf_data, pbuf_wdata, merged;
  logic  merged_unc;

  assign key = (state == IDLE) ? blk_i : blk_q;

  predecode_buf #(.ENTRIES(PBUF_ENTRIES), .KEY_W(BLK_W), .DATA_W(LINE_BITS)) u_pbuf (
    .clk, .rst_n, .key_i(key), .lookup_i(pbuf_lookup), .insert_i(pbuf_insert),
    .update_i(pbuf_update), .flush_i(cfg_we_i), .data_i(pbuf_wdata),
    .hit_o(pbuf_hit), .data_o(pbuf_data)
  );

  flu_buf #(.ENTRIES(FLU_ENTRIES), .KEY_W(BLK_W)) u_flu (
    .clk, .rst_n, .key_i(key), .lookup_i(flu_lookup), .insert_i(flu_insert),
    .flush_i(cfg_we_i), .hit_o(flu_hit)
  );

  // ---------------- M-ECC cache ----------------
  logic              search, mecc_wr;
  logic [NSUB-1:0]   mecc_hit;
  logic [MECC_W-1:0] mecc_chk [NSUB];
  logic [MECC_W-1:0] enc_chk  [NSUB];

  mecc_cache #(.ENTRIES(MECC_ENTRIES), .BLK_W(BLK_W)) u_mecc (
    .clk, .rst_n,
    .cfg_we_i, .cfg_idx_i, .cfg_valid_i, .cfg_loc_i,
    .search_i(search), .blk_i(key), .hit_o(mecc_hit), .chk_o(mecc_chk),
    .wr_i(mecc_wr), .wr_mask_i(mecc_hit), .wr_chk_i(enc_chk)
  );

  // ---------------- BCH lanes ----------------
  logic [NSUB-1:0] dec_start, dec_done, dec_unc;
  line_t           dec_data;
  for (genvar s = 0; s < NSUB; s++) begin : g_lane
    logic       busy;
    logic [1:0] nerr;
    bch_enc u_enc (.data_i(wdata_q[s*SUB_BITS +: SUB_BITS]), .chk_o(enc_chk[s]));
    bch_dec u_dec (
      .clk, .rst_n, .start_i(dec_start[s]),
      .data_i(raw_q[s*SUB_BITS +: SUB_BITS]), .chk_i(mecc_chk[s]),
      .busy_o(busy), .done_o(dec_done[s]),
      .data_o(dec_data[s*SUB_BITS +: SUB_BITS]), .nerr_o(nerr), .uncorr_o(dec_unc[s])
    );
  end

  always_comb begin
    for (int unsigned s = 0; s < NSUB; s++)
      merged[s*SUB_BITS +: SUB_BITS] = dec_mask[s] ? dec_data[s*SUB_BITS +: SUB_BITS]
                                                   : sec_q[s*SUB_BITS +: SUB_BITS];
    merged_unc = |(dec_mask & dec_unc) | |(~dec_mask & sec_unc_q);
  end

  // ---------------- control ----------------
  always_comb begin
    pbuf_lookup = (state == IDLE) && rd_i;
    pbuf_update = (state == IDLE) && wr_i;
    flu_lookup  = (state == IDLE) && (rd_i && !pbuf_hit || wr_i);
    search      = (state == IDLE) && ((rd_i && !pbuf_hit && !flu_hit) || (wr_i && !flu_hit));
    flu_insert  = (state inside {RD_SRCH, WR_SRCH}) && (mecc_hit == '0);
    mecc_wr     = (state == WR_SRCH);
    dec_start   = (state == RD_SRCH) ? mecc_hit : '0;
    pbuf_insert = (state == DEC) && |(dec_done & dec_mask) && !merged_unc;
    pbuf_wdata  = (state == IDLE) ? wdata_i : merged;
  end

  assign ready_o          = (state == IDLE);
  assign ev_pbuf_hit_o    = pbuf_lookup && pbuf_hit;
  assign ev_flu_hit_o     = flu_lookup && flu_hit;
  assign ev_search_o      = search;
  assign ev_decode_o      = (state == RD_SRCH) && (mecc_hit != '0);
  assign ev_flu_insert_o  = flu_insert;
  assign ev_pbuf_insert_o = pbuf_insert;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      done_o    <= 1'b0;
      data_o    <= '0;
      uncorr_o  <= 1'b0;
      decoded_o <= 1'b0;
      dec_mask  <= '0;
      blk_q     <= '0;
      raw_q     <= '0;
      sec_q     <= '0;
      wdata_q   <= '0;
      sec_unc_q <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        IDLE: begin
          decoded_o <= 1'b0;
          uncorr_o  <= 1'b0;
          blk_q     <= blk_i;
          raw_q     <= raw_i;
          sec_q     <= sec_i;
          sec_unc_q <= sec_uncorr_i;
          wdata_q   <= wdata_i;
          if (rd_i) begin
            if (pbuf_hit) begin
              done_o <= 1'b1;
              data_o <= pbuf_data;
            end else if (flu_hit) begin
              done_o   <= 1'b1;
              data_o   <= sec_i;
              uncorr_o <= |sec_uncorr_i;
            end else begin
              state <= RD_SRCH;
            end
          end else if (wr_i) begin
            if (flu_hit) done_o <= 1'b1;
            else         state  <= WR_SRCH;
          end
        end
        RD_SRCH: begin
          dec_mask <= mecc_hit;
          if (mecc_hit == '0) begin
            state    <= IDLE;
            done_o   <= 1'b1;
            data_o   <= sec_q;
            uncorr_o <= |sec_unc_q;
          end else begin
            state <= DEC;
          end
        end
        DEC: begin
          if (|(dec_done & dec_mask)) begin
            state     <= IDLE;
            done_o    <= 1'b1;
            data_o    <= merged;
            uncorr_o  <= merged_unc;
            decoded_o <= 1'b1;
          end
        end
        WR_SRCH: begin
          state  <= IDLE;
          done_o <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A request may only be issued while the core is idle.
  assert property (@(posedge clk) disable iff (!rst_n) (rd_i || wr_i) |-> ready_o);
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_i && wr_i));
endmodule
