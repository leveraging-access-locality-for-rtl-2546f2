// tb_mecc_cache: loads random m-subblock tags (distinct locations), then searches
// every block location and checks the per-subblock hit vector against the loaded
// map, writes check bits for the found subblocks and reads them back, and checks
// that freeing a tag (valid = 0) removes it.
module tb_mecc_cache;
  import l2_pkg::*;
  localparam int E = 32, BW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, cfg_valid, search, wr;
  logic [$clog2(E)-1:0] cfg_idx;
  logic [BW+SUB_W-1:0] cfg_loc;
  logic [BW-1:0] blk;
  logic [NSUB-1:0] hit, wmask;
  logic [MECC_W-1:0] chk [NSUB];
  logic [MECC_W-1:0] wchk [NSUB];
  int checks = 0, failures = 0;
  logic [NSUB-1:0] map [1<<BW];
  logic [MECC_W-1:0] ref_chk [1<<BW][NSUB];
  int entry_of [1<<(BW+SUB_W)];

  mecc_cache #(.ENTRIES(E), .BLK_W(BW)) dut (.clk, .rst_n, .cfg_we_i(cfg_we), .cfg_idx_i(cfg_idx),
    .cfg_valid_i(cfg_valid), .cfg_loc_i(cfg_loc), .search_i(search), .blk_i(blk), .hit_o(hit),
    .chk_o(chk), .wr_i(wr), .wr_mask_i(wmask), .wr_chk_i(wchk));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_search(input int b);
    blk = BW'(b); search = 1;
    @(negedge clk); search = 0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int loc, n;
    {cfg_we, cfg_valid, search, wr, cfg_idx, cfg_loc, blk, wmask} = '0;
    foreach (wchk[s]) wchk[s] = '0;
    foreach (map[b]) map[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n = 0;
    while (n < E) begin                     // distinct random locations
      loc = $urandom_range(0, (1 << (BW + SUB_W)) - 1);
      if (!map[loc >> SUB_W][loc % NSUB]) begin
        map[loc >> SUB_W][loc % NSUB] = 1'b1;
        entry_of[loc] = n;
        cfg_we = 1; cfg_valid = 1; cfg_idx = 5'(n); cfg_loc = (BW+SUB_W)'(loc);
        @(negedge clk);
        n++;
      end
    end
    cfg_we = 0;
    for (int b = 0; b < (1 << BW); b++) begin
      do_search(b);
      check("hit map", hit == map[b]);
      foreach (wchk[s]) begin wchk[s] = MECC_W'($urandom); ref_chk[b][s] = wchk[s]; end
      wmask = '1; wr = 1;
      @(negedge clk); wr = 0;
    end
    for (int b = 0; b < (1 << BW); b++) begin
      do_search(b);
      for (int s = 0; s < NSUB; s++)
        if (map[b][s]) check("check bits", chk[s] == ref_chk[b][s]);
    end
    // free one tag
    for (int b = 0; b < (1 << BW); b++)
      for (int s = 0; s < NSUB; s++)
        if (map[b][s] && n == E) begin
          cfg_we = 1; cfg_valid = 0; cfg_idx = 5'(entry_of[b*NSUB+s]); cfg_loc = {BW'(b), SUB_W'(s)};
          @(negedge clk); cfg_we = 0;
          map[b][s] = 0; n--;
          do_search(b);
          check("freed tag", hit == map[b]);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
