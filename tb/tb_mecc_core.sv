// tb_mecc_core: drives the multibit ECC core as the L2 controller would, with a
// small configuration (16 block locations, 2-entry predecoding and FLU buffers).
// The testbench plays the cache core: it keeps the true data of every block,
// hands the core raw data with two wrong bits in each m-subblock (the defects)
// and SEC-DED-corrected data for the others. It checks read data, the
// uncorrectable flag, which path each access took (predecoding hit, FLU hit,
// M-ECC search, explicit decode) against reference LRU lists, and the latency:
// 1 cycle for buffer hits, 2 for a search without m-subblocks and 84 for a read
// that needs the 82-cycle decoder.
module tb_mecc_core;
  import l2_pkg::*;
  localparam int E = 32, NB = 2, BW = 4, NBLK = 1 << BW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, cfg_valid, ready, rd, wr, done, unc, decoded;
  logic [4:0] cfg_idx;
  logic [BW+SUB_W-1:0] cfg_loc;
  logic [BW-1:0] blk;
  line_t raw, sec, wdata, dout;
  logic [NSUB-1:0] sec_unc;
  logic e_pb, e_flu, e_srch, e_dec, e_fins, e_pins;
  int checks = 0, failures = 0;
  int n_pb = 0, n_flu = 0, n_dec = 0, n_plain = 0, n_unc = 0;

  mecc_core #(.MECC_ENTRIES(E), .PBUF_ENTRIES(NB), .FLU_ENTRIES(NB), .BLK_W(BW)) dut (
    .clk, .rst_n, .cfg_we_i(cfg_we), .cfg_idx_i(cfg_idx), .cfg_valid_i(cfg_valid),
    .cfg_loc_i(cfg_loc), .ready_o(ready), .rd_i(rd), .wr_i(wr), .blk_i(blk), .raw_i(raw),
    .sec_i(sec), .sec_uncorr_i(sec_unc), .wdata_i(wdata), .done_o(done), .data_o(dout),
    .uncorr_o(unc), .decoded_o(decoded), .ev_pbuf_hit_o(e_pb), .ev_flu_hit_o(e_flu),
    .ev_search_o(e_srch), .ev_decode_o(e_dec), .ev_flu_insert_o(e_fins),
    .ev_pbuf_insert_o(e_pins));

  logic [NSUB-1:0] mmap [NBLK];
  line_t           gold [NBLK];
  int              pb_list [$], flu_list [$];

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int find(ref int q [$], input int k);
    foreach (q[i]) if (q[i] == k) return i;
    return -1;
  endfunction

  task automatic lru_touch(ref int q [$], input int k);
    int p;
    p = find(q, k);
    if (p >= 0) q.delete(p);
    else if (q.size() == NB) void'(q.pop_back());
    q.push_front(k);
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < LINE_BITS / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  // issue one request, return cycles until done
  task automatic issue(input logic is_rd, output int cyc, output logic sw_pb, sw_flu,
                       sw_srch, sw_dec);
    while (!ready) @(negedge clk);
    rd = is_rd; wr = !is_rd;
    sw_pb = 0; sw_flu = 0; sw_srch = 0; sw_dec = 0;
    cyc = 0;
    do begin
      #1;
      sw_pb |= e_pb; sw_flu |= e_flu; sw_srch |= e_srch; sw_dec |= e_dec;
      @(negedge clk); rd = 0; wr = 0; cyc++;
    end while (!done);
  endtask

  task automatic do_write(input int b);
    int cyc;
    logic a, f, s, d;
    gold[b] = rnd_line();
    blk = BW'(b); wdata = gold[b];
    issue(1'b0, cyc, a, f, s, d);
    check("write path", f == (find(flu_list, b) >= 0) && s == !f && !d);
    if (find(flu_list, b) >= 0) lru_touch(flu_list, b);
    else if (mmap[b] == 0) lru_touch(flu_list, b);
  endtask

  task automatic do_read(input int b, input int nflip);
    int cyc, p, q;
    logic a, f, s, d, exp_pb, exp_flu, exp_dec;
    line_t r;
    r = gold[b];
    for (int k = 0; k < NSUB; k++)
      if (mmap[b][k]) begin
        p = $urandom_range(0, 63);
        do q = $urandom_range(0, 63); while (q == p);
        r[k*64 + p] = ~r[k*64 + p];
        if (nflip > 1) r[k*64 + q] = ~r[k*64 + q];
        if (nflip > 2) r[k*64 + ((q + 1 == p) ? (q + 2) % 64 : (q + 1) % 64)] ^= 1'b1;
      end
    blk = BW'(b); raw = r; sec = gold[b]; sec_unc = '0;
    exp_pb  = find(pb_list, b) >= 0;
    exp_flu = !exp_pb && find(flu_list, b) >= 0;
    exp_dec = !exp_pb && !exp_flu && mmap[b] != 0;
    issue(1'b1, cyc, a, f, s, d);
    check("path", a == exp_pb && f == exp_flu && s == (!exp_pb && !exp_flu) && d == exp_dec);
    check("decoded flag", decoded == exp_dec);
    if (exp_pb) begin n_pb++; lru_touch(pb_list, b); check("pbuf latency", cyc == 1); end
    else if (exp_flu) begin n_flu++; lru_touch(flu_list, b); check("flu latency", cyc == 1); end
    else if (exp_dec) begin
      n_dec++;
      check("decode latency", cyc == 84);
      if (cyc != 84) $display("decode latency %0d", cyc);
      if (nflip <= 2) lru_touch(pb_list, b);
    end else begin
      n_plain++; lru_touch(flu_list, b); check("search latency", cyc == 2);
    end
    if (nflip <= 2 || !exp_dec) check("read data", dout == gold[b] && !unc);
    else begin n_unc++; check("triple error detected", unc); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, b;
    {cfg_we, cfg_valid, rd, wr, cfg_idx, cfg_loc, blk, sec_unc} = '0;
    raw = '0; sec = '0; wdata = '0;
    foreach (mmap[i]) mmap[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // m-subblocks: blocks 0..7 get one or two of them, blocks 8..15 are plain
    n = 0;
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < 1 + i % 2; k++) begin
        int s;
        do s = $urandom_range(0, NSUB - 1); while (mmap[i][s]);
        mmap[i][s] = 1'b1;
        cfg_we = 1; cfg_valid = 1; cfg_idx = 5'(n); cfg_loc = {BW'(i), SUB_W'(s)};
        @(negedge clk); n++;
      end
    cfg_we = 0;
    for (int i = 0; i < NBLK; i++) do_write(i);
    for (int t = 0; t < 300; t++) begin
      b = (t % 3 == 0) ? $urandom_range(0, NBLK - 1) : $urandom_range(0, 2) + 8 * (t % 2);
      case ($urandom_range(0, 9))
        0, 1: do_write(b);
        2:    do_read(b, 3);
        3:    do_read(b, 1);
        default: do_read(b, 2);
      endcase
    end
    check("coverage", n_pb > 0 && n_flu > 0 && n_dec > 0 && n_plain > 0 && n_unc > 0);
    $display("pbuf %0d flu %0d decode %0d plain %0d uncorrectable %0d", n_pb, n_flu, n_dec, n_plain, n_unc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
