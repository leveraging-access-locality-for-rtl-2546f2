// secded_enc: (72,64) Hsiao single-error-correcting, double-error-detecting encoder.
//
// The conventional L2 cache core protects every 64-bit subblock with a SEC-DED
// code, as current L2 caches do. This encoder computes the 8 check bits of one
// subblock: check bit k is the XOR of the data bits whose Hsiao column (see
// l2_pkg::HSIAO_COL) has bit k set. Purely combinational, no latency.
// The use of SEC-DED on 64-bit subblocks follows the document; the Hsiao
// construction is this design's choice (the document does not name the code).
module secded_enc
  import l2_pkg::*;
(
  input  sub_t                 data_i,
  output logic [SEC_CHK-1:0]   chk_o
);
  always_comb begin
    chk_o = '0;
    for (int unsigned i = 0; i < SUB_BITS; i++)
      if (data_i[i]) chk_o ^= HSIAO_COL[i];
  end
endmodule
