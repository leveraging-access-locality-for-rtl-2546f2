// tb_secded: self-checking test of the (72,64) SEC-DED encoder and decoder.
// It checks the code's defining properties independently of the RTL: 64 distinct
// odd-weight (3 or 5) columns, every single-bit error over all 72 bits corrected,
// and random double-bit errors detected, never silently passed.
module tb_secded;
  import l2_pkg::*;
  sub_t        data, rd;
  logic [7:0]  chk, rc;
  sub_t        dout;
  logic        corr, unc;
  int checks = 0, failures = 0;

  secded_enc u_enc (.data_i(data), .chk_o(chk));
  secded_dec u_dec (.data_i(rd), .chk_i(rc), .data_o(dout), .corrected_o(corr), .uncorr_o(unc));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [71:0] w;
    logic [7:0] col [64];
    // each data bit's column: probe the encoder with a one-hot word
    for (int i = 0; i < 64; i++) begin
      data = sub_t'(1) << i; #1;
      col[i] = chk;
      check("odd column weight 3 or 5", $countones(chk) == 3 || $countones(chk) == 5);
    end
    for (int i = 0; i < 64; i++)
      for (int j = i + 1; j < 64; j++)
        if (col[i] == col[j]) check("distinct columns", 1'b0);
    for (int t = 0; t < 40; t++) begin
      data = {$urandom, $urandom}; #1;
      w = {chk, data};
      rd = w[63:0]; rc = w[71:64]; #1;
      check("clean word", dout == data && !corr && !unc);
      for (int b = 0; b < 72; b++) begin
        w = {chk, data}; w[b] = ~w[b];
        rd = w[63:0]; rc = w[71:64]; #1;
        check("single error corrected", dout == data && corr && !unc);
      end
      for (int k = 0; k < 20; k++) begin
        int a, b;
        a = $urandom_range(0, 71);
        do b = $urandom_range(0, 71); while (b == a);
        w = {chk, data}; w[a] = ~w[a]; w[b] = ~w[b];
        rd = w[63:0]; rc = w[71:64]; #1;
        check("double error detected", unc && !corr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
