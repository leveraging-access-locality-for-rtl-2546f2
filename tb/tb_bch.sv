// tb_bch: self-checking test of the DEC-TED BCH encoder and PGZ decoder.
// For random 64-bit words it checks that the 78-bit codeword is divisible by the
// generator polynomial (computed here by plain polynomial division), that the
// parity bit makes the 79-bit word even, that 0, 1 and 2 bit errors (parity bit
// included) are corrected, that 3 errors are flagged uncorrectable, and that the
// decoder answers exactly 82 cycles after start.
module tb_bch;
  import l2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sub_t              data, rx_data;
  logic [MECC_W-1:0] chk, rx_chk;
  logic              start, busy, done, uncorr;
  sub_t              dout;
  logic [1:0]        nerr;
  int checks = 0, failures = 0;

  bch_enc u_enc (.data_i(data), .chk_o(chk));
  bch_dec u_dec (.clk, .rst_n, .start_i(start), .data_i(rx_data), .chk_i(rx_chk),
                 .busy_o(busy), .done_o(done), .data_o(dout), .nerr_o(nerr), .uncorr_o(uncorr));

  function automatic logic [13:0] poly_rem(input logic [77:0] c);
    logic [77:0] r;
    r = c;
    for (int i = 77; i >= 14; i--)
      if (r[i]) r ^= 78'(15'h4377) << (i - 14);
    return r[13:0];
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // flip the listed positions of the 79-bit word {parity, data, bch}
  task automatic run(input int nflip, input int p0, input int p1, input int p2);
    logic [78:0] w;
    int cyc;
    w = {chk[14], data, chk[13:0]};
    if (nflip > 0) w[p0] = ~w[p0];
    if (nflip > 1) w[p1] = ~w[p1];
    if (nflip > 2) w[p2] = ~w[p2];
    rx_data = w[77:14];
    rx_chk  = {w[78], w[13:0]};
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check("latency 82", cyc == 82);
    if (cyc != 82) $display("latency %0d", cyc);
    if (nflip <= 2) begin
      check("corrected data", dout == data && !uncorr);
      check("error count", nerr == 2'(nflip));
    end else begin
      check("triple detected", uncorr);
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, c;
    start = 0; data = '0; rx_data = '0; rx_chk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      data = {$urandom, $urandom};
      #1;
      check("codeword divisible by g(x)", poly_rem({data, chk[13:0]}) == 14'd0);
      check("overall parity even", ^{chk, data} == 1'b0);
      a = $urandom_range(0, 78);
      do b = $urandom_range(0, 78); while (b == a);
      do c = $urandom_range(0, 78); while (c == a || c == b);
      run(t % 4, a, b, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
