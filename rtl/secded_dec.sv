// secded_dec: (72,64) Hsiao SEC-DED decoder for one L2 subblock.
//
// The syndrome is the stored check bits XOR the check bits recomputed from the
// stored data. A zero syndrome means no error; an odd-weight syndrome equal to a
// data column flips that data bit, and a unit syndrome means a check bit was
// wrong (data untouched); any other non-zero syndrome (even weight, or odd weight
// matching no column) reports an uncorrectable error. Combinational.
// Interface: data_i/chk_i as read from the array; data_o corrected data,
// corrected_o one error corrected, uncorr_o two or more errors detected.
module secded_dec
  import l2_pkg::*;
(
  input  sub_t                 data_i,
  input  logic [SEC_CHK-1:0]   chk_i,
  output sub_t                 data_o,
  output logic                 corrected_o,
  output logic                 uncorr_o
);
  logic [SEC_CHK-1:0] recomputed, syn;
  logic               hit;

  secded_enc u_enc (.data_i(data_i), .chk_o(recomputed));

  always_comb begin
    syn         = recomputed ^ chk_i;
    data_o      = data_i;
    hit         = 1'b0;
    for (int unsigned i = 0; i < SUB_BITS; i++)
      if (syn != '0 && syn == HSIAO_COL[i]) begin
        data_o[i] = ~data_i[i];
        hit       = 1'b1;
      end
    if ($countones(syn) == 1) hit = 1'b1;        // error in a check bit
    corrected_o = (syn != '0) && hit;
    uncorr_o    = (syn != '0) && !hit;
  end
endmodule
