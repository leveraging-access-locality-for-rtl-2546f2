// tb_dr_cache: checks the dirty replication cache against a reference LRU list:
// write-back hits update the copy, misses fill free entries, a full cache hands
// out its LRU copy for write-back to memory, discards drop copies, and lookups
// return the latest data.
module tb_dr_cache;
  localparam int N = 4, AW = 8, DW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] addr, ev_addr;
  logic [DW-1:0] din, dout, ev_data;
  logic wb, discard, hit, evict, ev_hit, ev_ins;
  int checks = 0, failures = 0, n_hit = 0, n_ev = 0, n_dis = 0;
  typedef struct { logic [AW-1:0] a; logic [DW-1:0] d; } ent_t;
  ent_t model [$];

  dr_cache #(.ENTRIES(N), .ADDR_W(AW), .DATA_W(DW)) dut (.clk, .rst_n, .addr_i(addr),
    .data_i(din), .wb_i(wb), .discard_i(discard), .flush_i(1'b0), .hit_o(hit), .data_o(dout),
    .evict_o(evict), .evict_addr_o(ev_addr), .evict_data_o(ev_data),
    .ev_hit_o(ev_hit), .ev_insert_o(ev_ins));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find(input logic [AW-1:0] k);
    foreach (model[i]) if (model[i].a == k) return i;
    return -1;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int op, pos;
    ent_t e;
    {wb, discard, addr, din} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      op   = $urandom_range(0, 99);
      addr = AW'($urandom_range(0, 9));
      din  = $urandom;
      wb      = op < 70;
      discard = op >= 70 && op < 85;
      #1;
      pos = find(addr);
      check("hit", hit == (pos >= 0));
      if (pos >= 0) check("lookup data", dout == model[pos].d);
      check("ev_hit", ev_hit == (wb && pos >= 0));
      check("ev_insert", ev_ins == (wb && pos < 0 && model.size() < N));
      check("evict", evict == (wb && pos < 0 && model.size() == N));
      if (wb) begin
        e.a = addr; e.d = din;
        if (pos >= 0) begin n_hit++; model.delete(pos); end
        else if (model.size() == N) begin
          n_ev++;
          check("evict addr", ev_addr == model[N-1].a);
          check("evict data", ev_data == model[N-1].d);
          model.pop_back();
        end
        model.push_front(e);
      end else if (discard && pos >= 0) begin
        n_dis++; model.delete(pos);
      end
      @(negedge clk);
    end
    check("coverage", n_hit > 0 && n_ev > 0 && n_dis > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
