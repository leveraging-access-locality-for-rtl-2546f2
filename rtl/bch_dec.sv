// bch_dec: serial PGZ decoder for the DEC-TED BCH code of bch_enc.
//
// Operation (decoding parallelism 2: two codeword bits or two candidate error
// positions per cycle):
//   * syndrome phase, 39 cycles: Horner evaluation of S1 = r(alpha) and
//     S3 = r(alpha^3) over the 78-bit word, two bits per cycle, plus the overall
//     parity check;
//   * Peterson-Gorenstein-Zierler phase, 2 cycles: sigma1 = S1 and
//     sigma2 = (S3 + S1^3) / S1 (one cycle for S1^3 and S1^-1, one for sigma2
//     and the search set-up);
//   * Chien search, 39 cycles: each position j is tested as a root of
//     z^2 + sigma1 z + sigma2 at z = alpha^j, two positions per cycle, and every
//     root flips its bit;
//   * one cycle to classify and register the result.
// start_i is taken when the decoder is idle; done_o is high in the 82nd cycle
// after the cycle in which start_i was high (LATENCY = 82), with data_o, nerr_o
// (errors corrected, the parity bit included) and uncorr_o (three or more errors,
// or an inconsistent locator) valid from then until the next start.
// The PGZ algorithm, the parallelism of 2 and the resulting 82-cycle latency follow
// the document; the phase split that yields 82 cycles is this design's.
module bch_dec
  import l2_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start_i,
  input  sub_t                data_i,
  input  logic [MECC_W-1:0]   chk_i,
  output logic                busy_o,
  output logic                done_o,
  output sub_t                data_o,
  output logic [1:0]          nerr_o,
  output logic                uncorr_o
);
  localparam int unsigned STEPS = BCH_N / 2;               // 39
  localparam int unsigned LATENCY = 2 * STEPS + 4;         // 82 = 1 + 39 + 2 + 39 + 1
  localparam gf_t A1 = gf_t'(2);                           // alpha
  localparam gf_t A2 = gf_t'(4);                           // alpha^2
  localparam gf_t A3 = gf_t'(8);                           // alpha^3
  localparam gf_t A6 = gf_t'(64);                          // alpha^6

  logic [BCH_N-1:0] cw;
  logic             par;        // running parity, starts at the stored parity bit
  gf_t              s1, s3, s1cube, s1inv, sig2, z;
  logic [1:0]       roots;
  logic [6:0]       cnt;
  logic             busy;

  // Horner step inputs (two bits, highest first)
  logic r_hi, r_lo;
  logic [6:0] hi_idx;
  assign hi_idx = 7'(BCH_N - 1) - 7'(2 * (32'(cnt) - 1));
  assign r_hi   = cw[hi_idx];
  assign r_lo   = cw[hi_idx - 7'd1];

  // Chien evaluation of the two candidate positions 2k and 2k+1
  gf_t  za, zb, ea, eb;
  always_comb begin
    za = z;
    zb = gf_mul(z, A1);
    ea = gf_mul(za, za) ^ gf_mul(s1, za) ^ sig2;
    eb = gf_mul(zb, zb) ^ gf_mul(s1, zb) ^ sig2;
  end
  logic [6:0] pos;
  assign pos = 7'(2 * (32'(cnt) - (STEPS + 3)));   // cnt 42.. -> 0,2,...

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done_o   <= 1'b0;
      cnt      <= '0;
      cw       <= '0;
      par      <= 1'b0;
      s1       <= '0;
      s3       <= '0;
      s1cube   <= '0;
      s1inv    <= '0;
      sig2     <= '0;
      z        <= '0;
      roots    <= '0;
      data_o   <= '0;
      nerr_o   <= '0;
      uncorr_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (!busy) begin
        if (start_i) begin
          busy  <= 1'b1;
          cnt   <= 7'd1;
          cw    <= {data_i, chk_i[BCH_CHK-1:0]};
          par   <= chk_i[BCH_CHK];
          s1    <= '0;
          s3    <= '0;
          roots <= '0;
        end
      end else begin
        cnt <= cnt + 7'd1;
        if (cnt <= 7'(STEPS)) begin                         // syndromes
          s1  <= gf_mul(s1, A2) ^ (r_hi ? A1 : '0) ^ gf_t'(r_lo);
          s3  <= gf_mul(s3, A6) ^ (r_hi ? A3 : '0) ^ gf_t'(r_lo);
          par <= par ^ r_hi ^ r_lo;
        end else if (cnt == 7'(STEPS + 1)) begin
          s1cube <= gf_mul(gf_mul(s1, s1), s1);
          s1inv  <= gf_inv(s1);
        end else if (cnt == 7'(STEPS + 2)) begin
          sig2   <= gf_mul(s3 ^ s1cube, s1inv);
          z      <= gf_t'(1);
        end else if (cnt <= 7'(2 * STEPS + 2)) begin        // Chien search
          z <= gf_mul(z, A2);
          if (ea == '0) begin
            cw[pos] <= ~cw[pos];
          end
          if (eb == '0) begin
            cw[pos + 7'd1] <= ~cw[pos + 7'd1];
          end
          roots <= roots + 2'(ea == '0) + 2'(eb == '0);
        end else begin                                      // classify
          busy   <= 1'b0;
          done_o <= 1'b1;
          data_o <= cw[BCH_N-1:BCH_CHK];
          if (s1 == '0) begin
            uncorr_o <= (s3 != '0);
            nerr_o   <= (s3 != '0) ? 2'd0 : 2'(par);
          end else if (sig2 == '0) begin
            uncorr_o <= (roots != 2'd1);
            nerr_o   <= par ? 2'd1 : 2'd2;                 // even parity: parity bit also wrong
          end else begin
            uncorr_o <= par || (roots != 2'd2);
            nerr_o   <= 2'd2;
          end
        end
      end
    end
  end

  assign busy_o = busy;

  // The schedule above must add up to the stated latency.
  initial assert (LATENCY == 82);
endmodule
