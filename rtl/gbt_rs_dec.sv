// gbt_rs_dec: RS(15,11) decoder over GF(16) correcting up to two symbol errors.
//
// Works on one received codeword at a time, combinationally:
//   1. Syndromes S1..S4: the codeword evaluated at a, a^2, a^3, a^4.
//   2. Error locator L(x) = 1 + s1 x + s2 x^2 by the direct (Peterson)
//      solution for two errors: D = S1 S3 + S2^2; if D is nonzero,
//      s1 = (S1 S4 + S2 S3) / D and s2 = (S2 S4 + S3^2) / D; otherwise, if S1
//      is nonzero, one error with s1 = S2 / S1 and s2 = 0.
//   3. Search over the 15 positions k for roots L(a^-k) = 0.
//   4. Error value at each root (Forney, roots starting at a): with
//      W(x) = S1 + (S2 + S1 s1) x, e = W(a^-k) / s1.
// If the number of roots found differs from the number of errors assumed,
// or no locator exists (D and S1 both zero with a nonzero syndrome), the word
// is flagged uncorrectable and the information symbols are passed on
// unchanged. Three or more errors may also be taken for one or two and
// miscorrected, as with any decoder of this code.
//
// Interface: cw[59:0] holds the codeword, symbol c_k in bits 4k+3:4k, c_14
// first sent; msg is the corrected information part (c_14..c_4); corrected
// is high when errors were found and fixed; uncorrectable when not. The
// code parameters are this design's reading of the frame's FEC field.
`timescale 1ps/1ps
module gbt_rs_dec
  import gbt_pkg::*;
(
  input  logic [59:0]       cw,
  output logic [4*RS_K-1:0] msg,
  output logic              corrected,
  output logic              uncorrectable
);

  always_comb begin
    logic [3:0] s [5];
    logic [3:0] x, dd, s1, s2, xi, lam, w, e;
    logic [59:0] fixed;
    int nerr, nroot;
    // 1. Syndromes (Horner, highest degree first).
    for (int j = 1; j <= 4; j++) begin
      x = gf_pow_a(j);
      s[j] = '0;
      for (int k = 14; k >= 0; k--) s[j] = gf_mul(s[j], x) ^ cw[4*k +: 4];
    end
    s[0] = '0;
    // 2. Error locator.
    dd = gf_mul(s[1], s[3]) ^ gf_mul(s[2], s[2]);
    s1 = '0; s2 = '0; nerr = 0;
    if (s[1] == '0 && s[2] == '0 && s[3] == '0 && s[4] == '0) begin
      nerr = 0;
    end else if (dd != '0) begin
      s1 = gf_mul(gf_mul(s[1], s[4]) ^ gf_mul(s[2], s[3]), gf_inv(dd));
      s2 = gf_mul(gf_mul(s[2], s[4]) ^ gf_mul(s[3], s[3]), gf_inv(dd));
      nerr = 2;
    end else if (s[1] != '0) begin
      s1 = gf_mul(s[2], gf_inv(s[1]));
      nerr = 1;
    end else begin
      nerr = 3;                                   // no solution with t <= 2
    end
    // 3 and 4. Root search and correction.
    fixed = cw;
    nroot = 0;
    xi = '0; lam = '0; w = '0; e = '0;
    if (nerr == 1 || nerr == 2) begin
      for (int k = 0; k < 15; k++) begin
        xi  = gf_pow_a((15 - k) % 15);          // a^-k
        lam = 4'h1 ^ gf_mul(s1, xi) ^ gf_mul(s2, gf_mul(xi, xi));
        if (lam == '0) begin
          w = s[1] ^ gf_mul(s[2] ^ gf_mul(s[1], s1), xi);
          e = gf_mul(w, gf_inv(s1));
          fixed[4*k +: 4] = cw[4*k +: 4] ^ e;
          nroot++;
        end
      end
    end
    corrected     = (nerr == 1 || nerr == 2) && nroot == nerr;
    uncorrectable = (nerr == 3) || ((nerr == 1 || nerr == 2) && nroot != nerr);
    msg           = uncorrectable ? cw[59:16] : fixed[59:16];
  end

endmodule
