// tb_l2_mecc_full: the L2 cache at its full default size (1 MB, 8-way, 8192-entry
// M-ECC cache, 64-entry buffers, 13-cycle hit latency) through a short directed
// sequence against a 300-cycle memory model:
//   miss and fill of an m-block, a decoded read hit (13 + 82 cycles), a read hit
//   from the predecoding buffer (13), an L1 write-back into the DR cache, plain
//   blocks classified by an M-ECC search and then by the FLU buffer, and a soft
//   error in a clean block repaired from memory.
module tb_l2_mecc_full;
  import l2_pkg::*;
  localparam int WAYS = 8, MEM_LAT = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_we, resp_valid, mem_req, mem_we, mem_ack, cfg_we, cfg_valid;
  logic [LADDR_W-1:0] req_laddr, mem_laddr;
  line_t req_wdata, resp_data, mem_wdata, mem_rdata;
  logic [12:0] cfg_idx;
  logic [16:0] cfg_loc;
  l2_events_t ev;

  l2_mecc_top dut (
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

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // one request; cyc = cycles from acceptance to response, evs = events seen
  task automatic request(input logic we, input logic [LADDR_W-1:0] a, input line_t d,
                         output int cyc, output l2_events_t evs);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_laddr = a; req_wdata = d;
    @(negedge clk); req_valid = 0;
    cyc = 1; evs = '0;
    while (!resp_valid && cyc < 10000) begin
      evs |= ev;
      @(negedge clk); cyc++;
    end
    @(negedge clk);
  endtask

  initial begin
    #400000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    l2_events_t e;
    logic [LADDR_W-1:0] a, b;
    line_t d;
    {req_valid, req_we, req_laddr, cfg_we, cfg_valid, cfg_idx, cfg_loc} = '0;
    req_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    a = LADDR_W'('h12345);         // set 0x345, filled into way 0
    b = LADDR_W'('h22346);         // set 0x346, way 0, no defects
    // m-subblock 3 of {set 0x345, way 0}: two stuck cells, tag loaded at entry 100
    dut.u_core.u_data.set_stuck('h345 * WAYS + 0, 3 * 72 + 7, ~init_line(a)[3*64 + 7]);
    dut.u_core.u_data.set_stuck('h345 * WAYS + 0, 3 * 72 + 40, ~init_line(a)[3*64 + 40]);
    cfg_we = 1; cfg_valid = 1; cfg_idx = 13'd100; cfg_loc = {11'h345, 3'd0, 3'd3};
    @(negedge clk); cfg_we = 0;

    request(1'b0, a, '0, cyc, e);
    check("miss fill data", resp_data == init_line(a) && e.l2_miss);
    check("miss takes the memory latency", cyc > MEM_LAT);
    request(1'b0, a, '0, cyc, e);
    check("decoded hit data", resp_data == init_line(a));
    check("decoded hit latency 13+82", cyc == 95 && e.mecc_decode && e.pbuf_insert);
    request(1'b0, a, '0, cyc, e);
    check("predecoding hit", resp_data == init_line(a) && cyc == 13 && e.pbuf_hit && !e.mecc_search);
    d = ~init_line(a);
    request(1'b1, a, d, cyc, e);
    check("write-back into DR cache", e.dr_insert);
    request(1'b0, a, '0, cyc, e);
    check("read after write-back", resp_data == d && cyc == 13 && e.pbuf_hit);

    request(1'b0, b, '0, cyc, e);
    check("plain miss", resp_data == init_line(b) && e.l2_miss);
    request(1'b0, b, '0, cyc, e);
    check("FLU hit", resp_data == init_line(b) && cyc == 13 && e.flu_hit && !e.mecc_search);
    dut.u_core.u_data.flip('h346 * WAYS + 0, 5 * 72 + 1);
    dut.u_core.u_data.flip('h346 * WAYS + 0, 5 * 72 + 2);
    request(1'b0, b, '0, cyc, e);
    check("soft error repaired from memory", resp_data == init_line(b) && e.recover_mem);
    request(1'b0, b, '0, cyc, e);
    check("repaired block reads clean", resp_data == init_line(b) && cyc == 13 && !e.recover_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
