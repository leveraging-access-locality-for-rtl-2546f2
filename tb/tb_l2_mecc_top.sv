// tb_l2_mecc_top: end-to-end test of the defect-tolerant L2 cache at reduced size
// (16 sets x 4 ways, 4-entry predecoding, FLU and DR buffers, 128 M-ECC entries).
//
// The testbench places random stuck-at defects in the data array (single defects
// in some subblocks, two-defect m-subblocks in others), loads the M-ECC tags of the
// m-subblocks, and runs random block reads and L1 write-backs with locality over
// twice the cache capacity against a next-level memory model. From time to time it
// injects soft errors (two flips in a good subblock, one flip beside the defects of
// a defective one) into every way of a set just used, which only recovery from the
// DR cache or memory can repair. Checks: every read returns the latest written
// data, read hits answer after exactly 13 cycles (95 when the multibit decoder
// runs), and every mechanism of the design occurs at least once.
module tb_l2_mecc_top;
  import l2_pkg::*;
  localparam int SETS = 16, WAYS = 4, ME = 128, NB = 4, LAT = 13, MEM_LAT = 20;
  localparam int BLKS = SETS * WAYS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_we, resp_valid, mem_req, mem_we, mem_ack, cfg_we, cfg_valid;
  logic [LADDR_W-1:0] req_laddr, mem_laddr;
  line_t req_wdata, resp_data, mem_wdata, mem_rdata;
  logic [6:0] cfg_idx;
  logic [8:0] cfg_loc;
  l2_events_t ev;

  l2_mecc_top #(.SETS(SETS), .WAYS(WAYS), .MECC_ENTRIES(ME), .PBUF_ENTRIES(NB),
                .FLU_ENTRIES(NB), .DR_ENTRIES(NB), .L2_LATENCY(LAT)) dut (
    .clk, .rst_n, .req_valid_i(req_valid), .req_ready_o(req_ready), .req_we_i(req_we),
    .req_laddr_i(req_laddr), .req_wdata_i(req_wdata), .resp_valid_o(resp_valid),
    .resp_data_o(resp_data), .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_laddr_o(mem_laddr),
    .mem_wdata_o(mem_wdata), .mem_ack_i(mem_ack), .mem_rdata_i(mem_rdata),
    .cfg_we_i(cfg_we), .cfg_idx_i(cfg_idx), .cfg_valid_i(cfg_valid), .cfg_loc_i(cfg_loc),
    .events_o(ev));

  int checks = 0, failures = 0;
  function automatic line_t init_line(input logic [LADDR_W-1:0] a);
    line_t l;
    for (int i = 0; i < LINE_BITS / 32; i++) l[i*32 +: 32] = 32'(a) * 32'h9E37_79B9 + 32'(i) * 32'h85EB_CA6B;
    return l;
  endfunction

  // ---------------- next-level memory model ----------------
  line_t mem [logic [LADDR_W-1:0]];
  initial begin
    mem_ack = 0; mem_rdata = '0;
    forever begin
      @(posedge clk);
      if (mem_req && !mem_ack) begin
        repeat (MEM_LAT - 1) @(posedge clk);
        if (mem_we) mem[mem_laddr] = mem_wdata;
        else mem_rdata <= mem.exists(mem_laddr) ? mem[mem_laddr] : init_line(mem_laddr);
        mem_ack <= 1'b1;
        @(posedge clk);
        mem_ack <= 1'b0;
      end
    end
  end

  // ---------------- event counters ----------------
  int n_ev [14];
  always @(posedge clk) if (rst_n) begin
    n_ev[0] += int'(ev.pbuf_hit);    n_ev[1] += int'(ev.flu_hit);
    n_ev[2] += int'(ev.mecc_search); n_ev[3] += int'(ev.mecc_decode);
    n_ev[4] += int'(ev.flu_insert);  n_ev[5] += int'(ev.pbuf_insert);
    n_ev[6] += int'(ev.dr_hit);      n_ev[7] += int'(ev.dr_insert);
    n_ev[8] += int'(ev.dr_evict);    n_ev[9] += int'(ev.dr_discard);
    n_ev[10] += int'(ev.l2_miss);    n_ev[11] += int'(ev.l2_wb);
    n_ev[12] += int'(ev.recover_dr); n_ev[13] += int'(ev.recover_mem);
  end
  string ev_name [14] = '{"pbuf_hit", "flu_hit", "mecc_search", "mecc_decode", "flu_insert",
    "pbuf_insert", "dr_hit", "dr_insert", "dr_evict", "dr_discard", "l2_miss", "l2_wb",
    "recover_dr", "recover_mem"};

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---------------- defect map ----------------
  int cls [BLKS];           // 0 good, 1 single defect, 2 m-subblock
  int dsub [BLKS];          // defective subblock
  int dbit [BLKS][2];       // defective data bits

  line_t gold [logic [LADDR_W-1:0]];
  function automatic line_t golden(input logic [LADDR_W-1:0] a);
    return gold.exists(a) ? gold[a] : init_line(a);
  endfunction

  // one request; returns latency and whether it was a plain hit / decoded hit
  task automatic request(input logic we, input logic [LADDR_W-1:0] a, input line_t d);
    int cyc;
    logic miss, rec, dec;
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_laddr = a; req_wdata = d;
    @(negedge clk); req_valid = 0;
    cyc = 1; miss = 0; rec = 0; dec = 0;
    while (!resp_valid) begin
      miss |= ev.l2_miss; rec |= ev.recover_dr | ev.recover_mem; dec |= ev.mecc_decode;
      @(negedge clk); cyc++;
      if (cyc > 5000) break;
    end
    if (we) gold[a] = d;
    else begin
      check("read data", resp_data == golden(a));
      if (!miss && !rec) check("hit latency", cyc == (dec ? LAT + 82 : LAT));
    end
    @(negedge clk);
  endtask

  task automatic soft_errors(input int set);
    int w, b, p;
    for (w = 0; w < WAYS; w++) begin
      b = set * WAYS + w;
      if (cls[b] == 0) begin
        dut.u_core.u_data.flip(b, 0 * 72 + 3);
        dut.u_core.u_data.flip(b, 0 * 72 + 50);
      end else begin
        // a fixed position per location, so a repeated injection cancels
        // instead of exceeding what the codes can detect
        p = 0;
        while (p == dbit[b][0] || p == dbit[b][1]) p++;
        dut.u_core.u_data.flip(b, dsub[b] * 72 + p);
      end
    end
  endtask

  initial begin
    #50000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, op;
    logic [LADDR_W-1:0] a, recent [$];
    line_t d;
    {req_valid, req_we, req_laddr, cfg_we, cfg_valid, cfg_idx, cfg_loc} = '0;
    req_wdata = '0;
    foreach (n_ev[i]) n_ev[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // defects and M-ECC tags
    n = 0;
    for (int b = 0; b < BLKS; b++) begin
      op = $urandom_range(0, 9);
      cls[b] = op < 3 ? 2 : op < 7 ? 1 : 0;
      dsub[b] = $urandom_range(0, NSUB - 1);
      dbit[b][0] = $urandom_range(0, 63);
      do dbit[b][1] = $urandom_range(0, 63); while (dbit[b][1] == dbit[b][0]);
      if (cls[b] >= 1) dut.u_core.u_data.set_stuck(b, dsub[b] * 72 + dbit[b][0], 1'($urandom));
      if (cls[b] == 2) begin
        dut.u_core.u_data.set_stuck(b, dsub[b] * 72 + dbit[b][1], 1'($urandom));
        cfg_we = 1; cfg_valid = 1; cfg_idx = 7'(n); cfg_loc = {6'(b), 3'(dsub[b])};
        @(negedge clk); n++;
      end
    end
    cfg_we = 0;
    // traffic
    for (int t = 0; t < 6000; t++) begin
      if (recent.size() > 0 && $urandom_range(0, 9) < 7)
        a = recent[$urandom_range(0, recent.size() - 1)];
      else
        a = LADDR_W'($urandom_range(0, 2 * BLKS - 1));
      recent.push_front(a);
      if (recent.size() > 6) void'(recent.pop_back());
      op = $urandom_range(0, 99);
      if (op < 35) begin
        d = {$urandom, $urandom, $urandom, $urandom} * 128'h1_0000_0001;
        d = {4{d[127:0]}} ^ LINE_BITS'(t);
        request(1'b1, a, d);
      end else request(1'b0, a, '0);
      if (t % 25 == 24) begin
        soft_errors(int'(a % SETS));
        request(1'b0, a, '0);
      end
    end
    // directed: a fresh L1 write-back evicted from L2 while its DR copy is held
    a = LADDR_W'(5);
    request(1'b1, a, init_line(77));
    for (int k = 1; k <= WAYS; k++) request(1'b0, a + LADDR_W'(k * SETS), '0);
    request(1'b0, a, '0);
    foreach (n_ev[i]) begin
      $display("%-12s %0d", ev_name[i], n_ev[i]);
      check({"mechanism ", ev_name[i]}, n_ev[i] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
