// bch_enc: DEC-TED encoder for one 64-bit m-subblock.
//
// The code is a binary BCH code with designed distance 5 over GF(2^7), shortened
// to 78 bits (64 data + 14 check bits), extended with one overall parity bit to
// detect triple errors. The 14 BCH check bits are the remainder of
// d(x) * x^14 divided by g(x) = m1(x) m3(x) (l2_pkg::BCH_GEN); codeword bit j is
// check bit j for j < 14 and data bit j-14 above. The parity bit is the XOR of all
// 78 codeword bits. Output chk_o = {parity, bch[13:0]}: these 15 bits are what the
// M-ECC cache stores for the subblock. Combinational.
// The BCH DEC-TED code and its 14 check bits for 64 data bits follow the document;
// the field polynomial and storing the parity bit beside them are this design's.
module bch_enc
  import l2_pkg::*;
(
  input  sub_t                data_i,
  output logic [MECC_W-1:0]   chk_o
);
  logic [BCH_CHK-1:0] rem;
  logic               fb;

  always_comb begin
    rem = '0;
    for (int i = SUB_BITS - 1; i >= 0; i--) begin   // LFSR division, MSB first
      fb  = rem[BCH_CHK-1] ^ data_i[i];
      rem = {rem[BCH_CHK-2:0], 1'b0};
      if (fb) rem ^= BCH_GEN[BCH_CHK-1:0];
    end
    chk_o = {(^rem) ^ (^data_i), rem};
  end
endmodule
