// gbt_pkg: field widths and GF(16) arithmetic of the GBT frame.
//
// The GBT frame is 120 bits sent in one 25 ns bunch-crossing interval
// (4.8 Gb/s): header H (4), slow control SC (4), timing and trigger TTC
// (16), data D (64) and forward error correction FEC (32), in that order
// from the first transmitted (most significant) bit. The field widths are
// those of the GBT frame; the header value is this design's choice.
//
// The FEC is a double-error-correcting Reed-Solomon code, two codewords
// interleaved. With 4-bit symbols, two codewords of 11 information and 4
// check symbols (RS(15,11), corrects 2 symbol errors each) carry exactly the
// 88 bits of H, SC, TTC and D and fill the 32-bit FEC field. The field
// GF(16) is built on x^4 + x + 1 with alpha = x, and the generator
// polynomial is (x + a)(x + a^2)(x + a^3)(x + a^4); these code details are
// this design's choice, not given with the frame format.
`timescale 1ps/1ps
package gbt_pkg;
  localparam int unsigned FRAME_W = 120;
  localparam int unsigned H_W     = 4;
  localparam int unsigned SC_W    = 4;
  localparam int unsigned TTC_W   = 16;
  localparam int unsigned D_W     = 64;
  localparam int unsigned FEC_W   = 32;
  localparam int unsigned RS_K    = 11;   // information symbols per codeword
  localparam int unsigned RS_NK   = 4;    // check symbols per codeword
  localparam logic [3:0]  HEADER  = 4'b0101;

  // Product in GF(16) modulo x^4 + x + 1 (shift-and-add, high bit first).
  function automatic logic [3:0] gf_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] r;
    r = '0;
    for (int i = 3; i >= 0; i--) begin
      r = {r[2:0], 1'b0} ^ (r[3] ? 4'h3 : 4'h0);
      if (b[i]) r = r ^ a;
    end
    return r;
  endfunction

  // Inverse in GF(16): a^14 = a^8 * a^4 * a^2 (zero maps to zero).
  function automatic logic [3:0] gf_inv(input logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = gf_mul(a, a);
    a4 = gf_mul(a2, a2);
    a8 = gf_mul(a4, a4);
    return gf_mul(gf_mul(a8, a4), a2);
  endfunction

  // alpha^k for k = 0..14.
  function automatic logic [3:0] gf_pow_a(input int k);
    logic [3:0] r;
    r = 4'h1;
    for (int i = 0; i < k; i++) r = gf_mul(r, 4'h2);
    return r;
  endfunction

  // Low four coefficients g0..g3 of the monic generator polynomial, g0 in
  // bits 3:0.
  function automatic logic [15:0] rs_gen_poly();
    logic [3:0] g [5];
    logic [3:0] a;
    g[0] = 4'h1;
    for (int k = 1; k < 5; k++) g[k] = 4'h0;
    a = 4'h1;
    for (int i = 1; i <= 4; i++) begin
      a = gf_mul(a, 4'h2);
      for (int k = 4; k >= 1; k--) g[k] = g[k-1] ^ gf_mul(g[k], a);
      g[0] = gf_mul(g[0], a);
    end
    return {g[3], g[2], g[1], g[0]};
  endfunction
endpackage
