// tb_l2_data_sram: writes and reads back random words, then checks that stuck-at
// defects override written values and that an injected soft error flips exactly
// one stored bit until the word is rewritten.
module tb_l2_data_sram;
  localparam int W = 16, WW = 72;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd, wr;
  logic [3:0] addr;
  logic [WW-1:0] wdata, rdata;
  logic [WW-1:0] ref_mem [W];
  int checks = 0, failures = 0;

  l2_data_sram #(.WORDS(W), .WORD_W(WW)) dut (.clk, .rd_i(rd), .wr_i(wr), .addr_i(addr),
    .wdata_i(wdata), .rdata_o(rdata));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic write(input int a, input logic [WW-1:0] d);
    addr = 4'(a); wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic read(input int a);
    addr = 4'(a); rd = 1; @(negedge clk); rd = 0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < W; a++) begin
      ref_mem[a] = {$urandom, $urandom, $urandom};
      write(a, ref_mem[a]);
    end
    for (int a = 0; a < W; a++) begin read(a); check("read back", rdata == ref_mem[a]); end
    dut.set_stuck(3, 10, 1'b1);
    dut.set_stuck(3, 70, 1'b0);
    write(3, '0);
    read(3); check("stuck-at-1", rdata == (WW'(1) << 10));
    write(3, '1);
    read(3); check("stuck-at-0", rdata == ~(WW'(1) << 70));
    dut.flip(5, 33);
    read(5); check("soft error", rdata == (ref_mem[5] ^ (WW'(1) << 33)));
    write(5, ref_mem[5]);
    read(5); check("rewrite clears soft error", rdata == ref_mem[5]);
    dut.clear_defects();
    write(3, '0);
    read(3); check("defects cleared", rdata == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
