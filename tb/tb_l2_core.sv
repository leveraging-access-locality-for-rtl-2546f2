// tb_l2_core: random reads and block writes on a small L2 core (4 sets x 4 ways)
// against a reference model of tags, dirty bits, data and per-set LRU order.
// It checks hits, victim choice (first invalid way, else least recently used),
// victim address and dirty bit, read data, and the SEC-DED behaviour on stuck-at
// defects placed in the data array: one wrong cell is corrected, two wrong cells
// in a subblock are reported uncorrectable.
module tb_l2_core;
  import l2_pkg::*;
  localparam int SETS = 4, WAYS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [LADDR_W-1:0] laddr, vladdr;
  logic hit, hit_dirty, vvalid, vdirty, rd, wr, dirty, rvalid;
  logic [1:0] hit_way, vway, way;
  line_t wdata, raw, sec;
  logic [NSUB-1:0] corr, unc;
  int checks = 0, failures = 0, n_hit = 0, n_evict = 0;

  l2_core #(.SETS(SETS), .WAYS(WAYS)) dut (.clk, .rst_n, .laddr_i(laddr), .hit_o(hit),
    .hit_way_o(hit_way), .hit_dirty_o(hit_dirty), .vict_way_o(vway), .vict_valid_o(vvalid),
    .vict_dirty_o(vdirty), .vict_laddr_o(vladdr), .rd_i(rd), .wr_i(wr), .way_i(way),
    .wdata_i(wdata), .dirty_i(dirty), .rd_valid_o(rvalid), .raw_o(raw), .sec_o(sec),
    .sec_corr_o(corr), .sec_uncorr_o(unc));

  // reference model
  logic          m_valid [SETS][WAYS];
  logic          m_dirty [SETS][WAYS];
  logic [LADDR_W-1:0] m_addr [SETS][WAYS];
  line_t         m_data  [SETS][WAYS];
  int            m_order [SETS][$];      // ways, most recently used first

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic touch(input int s, input int w);
    foreach (m_order[s][i]) if (m_order[s][i] == w) begin m_order[s].delete(i); break; end
    m_order[s].push_front(w);
  endtask

  task automatic do_read(input int s, input int w);
    way = 2'(w); rd = 1; @(negedge clk); rd = 0;
    check("rd_valid", rvalid);
    touch(s, w);
  endtask

  task automatic do_write(input int s, input int w, input line_t d, input logic dt);
    way = 2'(w); wdata = d; dirty = dt; wr = 1; @(negedge clk); wr = 0;
    m_valid[s][w] = 1; m_dirty[s][w] = dt; m_addr[s][w] = laddr; m_data[s][w] = d;
    touch(s, w);
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < LINE_BITS / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, mw, exp_v;
    {rd, wr, dirty, way, laddr} = '0;
    wdata = '0;
    for (int i = 0; i < SETS; i++) for (int w = 0; w < WAYS; w++) begin
      m_valid[i][w] = 0; m_dirty[i][w] = 0;
      m_order[i].push_back(w);             // reset: way 0 youngest
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      laddr = LADDR_W'($urandom_range(0, 6) * SETS + $urandom_range(0, SETS - 1));
      s = int'(laddr % SETS);
      #1;
      mw = -1;
      for (int w = 0; w < WAYS; w++) if (m_valid[s][w] && m_addr[s][w] == laddr) mw = w;
      check("hit", hit == (mw >= 0));
      if (mw >= 0) begin
        n_hit++;
        check("hit way", hit_way == 2'(mw));
        check("hit dirty", hit_dirty == m_dirty[s][mw]);
        if ($urandom_range(0, 1)) begin
          do_read(s, mw);
          check("read data", sec == m_data[s][mw] && raw == m_data[s][mw] && corr == 0 && unc == 0);
        end else do_write(s, mw, rnd_line(), 1'b1);
      end else begin
        exp_v = -1;
        for (int w = WAYS - 1; w >= 0; w--) if (!m_valid[s][w]) exp_v = w;
        if (exp_v < 0) exp_v = m_order[s][WAYS-1];
        check("victim way", vway == 2'(exp_v));
        check("victim valid/dirty", vvalid == m_valid[s][exp_v] &&
              (!m_valid[s][exp_v] || vdirty == m_dirty[s][exp_v]));
        if (m_valid[s][exp_v]) begin
          n_evict++;
          check("victim address", vladdr == m_addr[s][exp_v]);
        end
        do_write(s, exp_v, rnd_line(), 1'($urandom_range(0, 1)));
      end
    end
    check("coverage", n_hit > 100 && n_evict > 100);
    // SEC-DED on defective cells: way 0 of set 1
    laddr = LADDR_W'(SETS + 1);
    #1;
    dut.u_data.set_stuck(1 * WAYS + 0, 72 * 2 + 5, 1'b1);     // subblock 2, data bit 5
    dut.u_data.set_stuck(1 * WAYS + 0, 72 * 6 + 40, 1'b0);    // subblock 6, data bit 40
    dut.u_data.set_stuck(1 * WAYS + 0, 72 * 6 + 41, 1'b0);    //   and data bit 41
    wdata = '0;
    wdata[6*64 + 40] = 1'b1;
    wdata[6*64 + 41] = 1'b1;
    do_write(1, 0, wdata, 1'b0);
    do_read(1, 0);
    check("single defect corrected", sec[2*64 +: 64] == 64'd0 && corr[2] && !unc[2]);
    check("raw shows the defect", raw[2*64 + 5] == 1'b1);
    check("double defect detected", unc[6] && !corr[6]);
    check("good subblocks clean", corr == 8'b0000_0100 && unc == 8'b0100_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
