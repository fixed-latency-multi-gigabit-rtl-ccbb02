// gbt_rs_enc: systematic RS(15,11) encoder over GF(16) for the GBT frame FEC.
//
// Divides m(x) * x^4 by the generator polynomial g(x) of gbt_pkg, one
// information symbol at a time, highest-degree symbol first, as the usual
// feedback shift register does; here the eleven steps are unrolled into one
// combinational function. The remainder is the four check symbols, so the
// codeword m(x) * x^4 + r(x) has roots a, a^2, a^3 and a^4 and a decoder can
// correct any two symbol errors.
//
// Interface: msg holds the 11 information symbols, msg[43:40] the highest
// degree (first sent); par holds the check symbols, par[15:12] the highest
// degree. Purely combinational. Using RS(15,11) for the double-error-
// correcting code of the frame is this design's reading of the FEC field.
`timescale 1ps/1ps
module gbt_rs_enc
  import gbt_pkg::*;
(
  input  logic [4*RS_K-1:0]  msg,
  output logic [4*RS_NK-1:0] par
);

  localparam logic [15:0] G = rs_gen_poly();

  always_comb begin
    logic [3:0] p [4];
    logic [3:0] fb;
    for (int k = 0; k < 4; k++) p[k] = '0;
    for (int s = int'(RS_K) - 1; s >= 0; s--) begin
      fb   = msg[4*s +: 4] ^ p[3];
      p[3] = p[2] ^ gf_mul(fb, G[15:12]);
      p[2] = p[1] ^ gf_mul(fb, G[11:8]);
      p[1] = p[0] ^ gf_mul(fb, G[7:4]);
      p[0] = gf_mul(fb, G[3:0]);
    end
    par = {p[3], p[2], p[1], p[0]};
  end

endmodule
