// l2_mecc_top: defect-tolerant L2 cache that uses multibit ECC selectively.
//
// A conventional SEC-DED protected L2 core (l2_core) is supplemented by
//   * the multibit ECC core (mecc_core): subblocks with two defective cells
//     (m-subblocks) get DEC-TED BCH check bits in a fully associative M-ECC
//     cache; a predecoding buffer of recently decoded m-blocks and a fast lookup
//     buffer of recently seen plain blocks keep the slow decoder and the large
//     M-ECC search off most accesses;
//   * the dirty replication cache (dr_cache): a copy of each recent L1
//     write-back, so every dirty block has a backup (here or in memory) and a
//     soft error that the array code can only detect is repaired from it.
// This module is the L2 controller that runs one request at a time.
// Requests (req_valid_i/req_ready_o handshake): req_we_i = 0 is a block read
// (L1 miss), answered on resp_valid_o/resp_data_o; req_we_i = 1 is an L1
// write-back of a full 64-byte block, acknowledged on resp_valid_o.
// Read-hit latency, counted from the accepting cycle: L2_LATENCY cycles, plus the
// 82-cycle decoder latency when explicit multibit decoding was needed. Misses
// write back a dirty victim (dropping its DR copy) and fetch from memory.
// Uncorrectable reads are restored from the DR cache, else from memory, and the
// repaired block is rewritten. Memory port: mem_req_o held until a one-cycle
// mem_ack_i (read data on mem_rdata_i with the ack). The M-ECC tags are loaded
// through cfg_*. events_o pulses one bit per mechanism for statistics.
// The architecture, sizes and latencies follow the document; the serial
// controller, the interfaces and the recovery sequence are this design's.
module l2_mecc_top
  import l2_pkg::*;
#(
  parameter int unsigned SETS         = 2048,
  parameter int unsigned WAYS         = 8,
  parameter int unsigned MECC_ENTRIES = 8192,
  parameter int unsigned PBUF_ENTRIES = 64,
  parameter int unsigned FLU_ENTRIES  = 64,
  parameter int unsigned DR_ENTRIES   = 64,
  parameter int unsigned L2_LATENCY   = 13
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // requests from the L1 caches
  input  logic                            req_valid_i,
  output logic                            req_ready_o,
  input  logic                            req_we_i,
  input  logic [LADDR_W-1:0]              req_laddr_i,
  input  line_t                           req_wdata_i,
  output logic                            resp_valid_o,
  output line_t                           resp_data_o,
  // next-level memory
  output logic                            mem_req_o,
  output logic                            mem_we_o,
  output logic [LADDR_W-1:0]              mem_laddr_o,
  output line_t                           mem_wdata_o,
  input  logic                            mem_ack_i,
  input  line_t                           mem_rdata_i,
  // M-ECC tag load
  input  logic                            cfg_we_i,
  input  logic [$clog2(MECC_ENTRIES)-1:0] cfg_idx_i,
  input  logic                            cfg_valid_i,
  input  logic [$clog2(SETS)+$clog2(WAYS)+SUB_W-1:0] cfg_loc_i,
  // statistics
  output l2_events_t                      events_o
);
  localparam int unsigned SET_W   = $clog2(SETS);
  localparam int unsigned WAY_W   = $clog2(WAYS);
  localparam int unsigned BLK_W   = SET_W + WAY_W;
  localparam int unsigned DEC_LAT = 82;

  typedef enum logic [4:0] {
    S_IDLE, S_LOOKUP, S_RD_WAIT, S_RD_MECC, S_REC_MEM, S_REPAIR, S_REPAIR_WAIT,
    S_V_RD_WAIT, S_V_MECC, S_V_WB, S_MEM_RD, S_FILL, S_FILL_WAIT,
    S_WRITE, S_WR_WAIT, S_DR, S_DR_EVICT, S_RESP
  } state_e;
  state_e state;

  logic               we_q, decoded_q, dirty_q, vwb_q;
  logic [LADDR_W-1:0] laddr_q, vaddr_q, eaddr_q;
  logic [WAY_W-1:0]   way_q;
  line_t              wdata_q, line_q, vdata_q, edata_q;
  logic [15:0]        lat_cnt;

  // ---------------- L2 core ----------------
  logic              c_hit, c_hit_dirty, c_vvalid, c_vdirty, c_rd, c_wr, c_dirty, c_rvalid;
  logic [WAY_W-1:0]  c_hit_way, c_vway, c_way;
  logic [LADDR_W-1:0] c_vladdr;
  line_t             c_wdata, c_raw, c_sec;
  logic [NSUB-1:0]   c_corr, c_unc;

  l2_core #(.SETS(SETS), .WAYS(WAYS)) u_core (
    .clk, .rst_n, .laddr_i(laddr_q),
    .hit_o(c_hit), .hit_way_o(c_hit_way), .hit_dirty_o(c_hit_dirty),
    .vict_way_o(c_vway), .vict_valid_o(c_vvalid), .vict_dirty_o(c_vdirty),
    .vict_laddr_o(c_vladdr),
    .rd_i(c_rd), .wr_i(c_wr), .way_i(c_way), .wdata_i(c_wdata), .dirty_i(c_dirty),
    .rd_valid_o(c_rvalid), .raw_o(c_raw), .sec_o(c_sec),
    .sec_corr_o(c_corr), .sec_uncorr_o(c_unc)
  );

  // ---------------- M-ECC core ----------------
  logic  m_ready, m_rd, m_wr, m_done, m_unc, m_decoded;
  line_t m_data;
  logic  ev_pbuf_hit, ev_flu_hit, ev_search, ev_decode, ev_flu_ins, ev_pbuf_ins;

  mecc_core #(
    .MECC_ENTRIES(MECC_ENTRIES), .PBUF_ENTRIES(PBUF_ENTRIES),
    .FLU_ENTRIES(FLU_ENTRIES), .BLK_W(BLK_W)
  ) u_mecc (
    .clk, .rst_n,
    .cfg_we_i, .cfg_idx_i, .cfg_valid_i, .cfg_loc_i,
    .ready_o(m_ready), .rd_i(m_rd), .wr_i(m_wr), .blk_i({laddr_q[SET_W-1:0], way_q}),
    .raw_i(c_raw), .sec_i(c_sec), .sec_uncorr_i(c_unc), .wdata_i(c_wdata),
    .done_o(m_done), .data_o(m_data), .uncorr_o(m_unc), .decoded_o(m_decoded),
    .ev_pbuf_hit_o(ev_pbuf_hit), .ev_flu_hit_o(ev_flu_hit), .ev_search_o(ev_search),
    .ev_decode_o(ev_decode), .ev_flu_insert_o(ev_flu_ins), .ev_pbuf_insert_o(ev_pbuf_ins)
  );

  // ---------------- DR cache ----------------
  logic               d_wb, d_discard, d_hit, d_evict, d_ev_hit, d_ev_ins;
  logic [LADDR_W-1:0] d_addr, d_evict_addr;
  line_t              d_data, d_evict_data;

  dr_cache #(.ENTRIES(DR_ENTRIES), .ADDR_W(LADDR_W), .DATA_W(LINE_BITS)) u_dr (
    .clk, .rst_n, .addr_i(d_addr), .data_i(wdata_q), .wb_i(d_wb), .discard_i(d_discard),
    .flush_i(1'b0), .hit_o(d_hit), .data_o(d_data),
    .evict_o(d_evict), .evict_addr_o(d_evict_addr), .evict_data_o(d_evict_data),
    .ev_hit_o(d_ev_hit), .ev_insert_o(d_ev_ins)
  );

  // ---------------- datapath control ----------------
  always_comb begin
    c_rd      = (state == S_LOOKUP) && !we_q && c_hit
             || (state == S_LOOKUP) && !c_hit && c_vvalid && c_vdirty;
    c_way     = (state == S_LOOKUP) ? (c_hit ? c_hit_way : c_vway) : way_q;
    c_wr      = state inside {S_FILL, S_WRITE, S_REPAIR};
    c_wdata   = (state == S_WRITE) ? wdata_q : line_q;
    c_dirty   = (state == S_WRITE) || (state == S_REPAIR && dirty_q);
    m_rd      = state inside {S_RD_WAIT, S_V_RD_WAIT};
    m_wr      = c_wr;
    d_addr    = (state == S_V_MECC) ? vaddr_q : laddr_q;
    d_wb      = (state == S_DR);
    d_discard = (state == S_V_MECC) && m_done;
    req_ready_o  = (state == S_IDLE) && m_ready;
    resp_valid_o = (state == S_RESP) &&
                   (lat_cnt >= 16'(L2_LATENCY + (decoded_q ? DEC_LAT : 0)));
    resp_data_o  = line_q;
    mem_req_o    = (state == S_V_WB && vwb_q) || state inside {S_MEM_RD, S_REC_MEM, S_DR_EVICT};
    mem_we_o     = state inside {S_V_WB, S_DR_EVICT};
    mem_laddr_o  = (state == S_V_WB) ? vaddr_q : (state == S_DR_EVICT) ? eaddr_q : laddr_q;
    mem_wdata_o  = (state == S_V_WB) ? vdata_q : edata_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      we_q      <= 1'b0;
      decoded_q <= 1'b0;
      dirty_q   <= 1'b0;
      vwb_q     <= 1'b0;
      laddr_q   <= '0;
      vaddr_q   <= '0;
      eaddr_q   <= '0;
      way_q     <= '0;
      wdata_q   <= '0;
      line_q    <= '0;
      vdata_q   <= '0;
      edata_q   <= '0;
      lat_cnt   <= '0;
    end else begin
      if (lat_cnt != '1) lat_cnt <= lat_cnt + 16'd1;
      unique case (state)
        S_IDLE: if (req_valid_i && req_ready_o) begin
          we_q      <= req_we_i;
          laddr_q   <= req_laddr_i;
          wdata_q   <= req_wdata_i;
          decoded_q <= 1'b0;
          lat_cnt   <= 16'd1;
          state     <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (c_hit) begin
            way_q   <= c_hit_way;
            dirty_q <= c_hit_dirty;
            state   <= we_q ? S_WRITE : S_RD_WAIT;
          end else begin
            way_q   <= c_vway;
            vaddr_q <= c_vladdr;
            if (c_vvalid && c_vdirty) state <= S_V_RD_WAIT;
            else                      state <= we_q ? S_WRITE : S_MEM_RD;
          end
        end
        // ---- read hit ----
        S_RD_WAIT: state <= S_RD_MECC;
        S_RD_MECC: if (m_done) begin
          decoded_q <= m_decoded;
          if (!m_unc) begin
            line_q <= m_data;
            state  <= S_RESP;
          end else if (d_hit) begin
            line_q <= d_data;
            state  <= S_REPAIR;
          end else begin
            state  <= S_REC_MEM;
          end
        end
        S_REC_MEM: if (mem_ack_i) begin
          line_q <= mem_rdata_i;
          state  <= S_REPAIR;
        end
        S_REPAIR:      state <= S_REPAIR_WAIT;
        S_REPAIR_WAIT: if (m_done) state <= S_RESP;
        // ---- dirty victim ----
        S_V_RD_WAIT: state <= S_V_MECC;
        S_V_MECC: if (m_done) begin
          vdata_q <= (m_unc && d_hit) ? d_data : m_data;
          // an unreadable victim without a DR copy is already current in memory
          vwb_q   <= !(m_unc && !d_hit);
          state   <= S_V_WB;
        end
        S_V_WB: if (!vwb_q || mem_ack_i) state <= we_q ? S_WRITE : S_MEM_RD;
        // ---- miss fill ----
        S_MEM_RD: if (mem_ack_i) begin
          line_q <= mem_rdata_i;
          state  <= S_FILL;
        end
        S_FILL:      state <= S_FILL_WAIT;
        S_FILL_WAIT: if (m_done) state <= S_RESP;
        // ---- L1 write-back ----
        S_WRITE:   state <= S_WR_WAIT;
        S_WR_WAIT: if (m_done) state <= S_DR;
        S_DR: begin
          eaddr_q <= d_evict_addr;
          edata_q <= d_evict_data;
          state   <= d_evict ? S_DR_EVICT : S_RESP;
        end
        S_DR_EVICT: if (mem_ack_i) state <= S_RESP;
        S_RESP: if (resp_valid_o) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- events ----------------
  always_comb begin
    events_o             = '0;
    events_o.pbuf_hit    = ev_pbuf_hit;
    events_o.flu_hit     = ev_flu_hit;
    events_o.mecc_search = ev_search;
    events_o.mecc_decode = ev_decode;
    events_o.flu_insert  = ev_flu_ins;
    events_o.pbuf_insert = ev_pbuf_ins;
    events_o.dr_hit      = d_ev_hit;
    events_o.dr_insert   = d_ev_ins;
    events_o.dr_evict    = d_evict;
    events_o.dr_discard  = d_discard && d_hit;
    events_o.l2_miss     = (state == S_LOOKUP) && !c_hit;
    events_o.l2_wb       = (state == S_V_WB) && vwb_q && mem_ack_i;
    events_o.recover_dr  = ((state == S_RD_MECC) || (state == S_V_MECC)) && m_done && m_unc && d_hit;
    events_o.recover_mem = (state == S_REC_MEM) && mem_ack_i
                        || (state == S_V_MECC) && m_done && m_unc && !d_hit;
  end

  assert property (@(posedge clk) disable iff (!rst_n) mem_req_o && !mem_ack_i |=> mem_req_o);
endmodule
