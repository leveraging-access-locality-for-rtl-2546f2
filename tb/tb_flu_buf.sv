// tb_flu_buf: checks the FLU buffer against a reference LRU list kept in a queue
// (most recently used first): hits, insertion into free entries, LRU replacement
// when full, and flush. Random keys from a small range force frequent conflicts.
module tb_flu_buf;
  localparam int N = 4, KW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [KW-1:0] key;
  logic lookup, insert, flush, hit;
  int checks = 0, failures = 0, hits = 0, repl = 0;
  logic [KW-1:0] model [$];

  flu_buf #(.ENTRIES(N), .KEY_W(KW)) dut (.clk, .rst_n, .key_i(key), .lookup_i(lookup),
    .insert_i(insert), .flush_i(flush), .hit_o(hit));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find(input logic [KW-1:0] k);
    foreach (model[i]) if (model[i] == k) return i;
    return -1;
  endfunction

  initial begin
    int op, pos;
    {lookup, insert, flush, key} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      op  = $urandom_range(0, 99);
      key = KW'($urandom_range(0, 9));
      lookup = op < 60;
      insert = op >= 60 && op < 98;
      flush  = op >= 98;
      #1;
      pos = find(key);
      checks++;
      if (hit !== (pos >= 0)) begin failures++; $display("FAIL hit key=%0d", key); end
      if (flush) model.delete();
      else if (pos >= 0 && lookup) begin
        hits++;
        model.delete(pos); model.push_front(key);
      end else if (pos < 0 && insert) begin
        if (model.size() == N) begin model.pop_back(); repl++; end
        model.push_front(key);
      end
      @(negedge clk);
    end
    checks++;
    if (hits == 0 || repl == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
