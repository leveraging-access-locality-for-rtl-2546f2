// tb_predecode_buf: checks the predecoding buffer against a reference LRU list
// of {key, data}: read hits and their data, insertion, LRU replacement, in-place
// update on write (no LRU change) and flush.
module tb_predecode_buf;
  localparam int N = 4, KW = 6, DW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [KW-1:0] key;
  logic [DW-1:0] din, dout;
  logic lookup, insert, update, flush, hit;
  int checks = 0, failures = 0, hits = 0, repl = 0, upd = 0;
  typedef struct { logic [KW-1:0] k; logic [DW-1:0] d; } ent_t;
  ent_t model [$];

  predecode_buf #(.ENTRIES(N), .KEY_W(KW), .DATA_W(DW)) dut (.clk, .rst_n, .key_i(key),
    .lookup_i(lookup), .insert_i(insert), .update_i(update), .flush_i(flush),
    .data_i(din), .hit_o(hit), .data_o(dout));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find(input logic [KW-1:0] k);
    foreach (model[i]) if (model[i].k == k) return i;
    return -1;
  endfunction

  initial begin
    int op, pos;
    ent_t e;
    {lookup, insert, update, flush, key, din} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      op  = $urandom_range(0, 99);
      key = KW'($urandom_range(0, 9));
      din = $urandom;
      lookup = op < 50;
      insert = op >= 50 && op < 75;
      update = op >= 75 && op < 98;
      flush  = op >= 98;
      #1;
      pos = find(key);
      checks++;
      if (hit !== (pos >= 0) || (pos >= 0 && dout !== model[pos].d)) begin
        failures++; $display("FAIL key=%0d hit=%0d", key, hit);
      end
      e.k = key; e.d = din;
      if (flush) model.delete();
      else if (lookup && pos >= 0) begin
        hits++; e = model[pos]; model.delete(pos); model.push_front(e);
      end else if (insert) begin
        if (pos >= 0) model.delete(pos);
        else if (model.size() == N) begin model.pop_back(); repl++; end
        model.push_front(e);
      end else if (update && pos >= 0) begin
        upd++; model[pos].d = din;
      end
      @(negedge clk);
    end
    checks++;
    if (hits == 0 || repl == 0 || upd == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
