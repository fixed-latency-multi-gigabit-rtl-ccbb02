// gbt_frame_rx: unpacks a received 120-bit GBT frame and corrects it.
//
// Undoes the interleaving of gbt_frame_tx: information symbol j (from the
// top) and check symbol j of the FEC field belong to codeword j mod 2. Each
// codeword goes through gbt_rs_dec, which corrects up to two wrong 4-bit
// symbols, so any burst of up to 13 adjacent wrong bits (16 if it starts on
// a symbol boundary) is repaired.
// The corrected header, slow control, TTC and data fields are registered.
//
// Interface: frame is sampled on clk (40 MHz) when valid is high; one clock
// later sc, ttc, d are the corrected fields, header_ok says the corrected
// header matches, corrected says errors were fixed, uncorrectable that a
// codeword could not be fixed. The receive side is this design's
// counterpart of the frame builder; no receive structure is given with the
// frame format.
`timescale 1ps/1ps
module gbt_frame_rx
  import gbt_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               valid,
  input  logic [FRAME_W-1:0] frame,
  output logic [SC_W-1:0]    sc,
  output logic [TTC_W-1:0]   ttc,
  output logic [D_W-1:0]     d,
  output logic               header_ok,
  output logic               corrected,
  output logic               uncorrectable
);

  logic [59:0] cw_a, cw_b;
  logic [43:0] msg_a, msg_b;
  logic        cor_a, cor_b, unc_a, unc_b;
  logic [87:0] info;

  always_comb begin
    for (int j = 0; j < 22; j++) begin
      if (j % 2 == 0) cw_a[16 + 4*(10 - j/2) +: 4] = frame[119 - 4*j -: 4];
      else            cw_b[16 + 4*(10 - j/2) +: 4] = frame[119 - 4*j -: 4];
    end
    for (int j = 0; j < 8; j++) begin
      if (j % 2 == 0) cw_a[4*(3 - j/2) +: 4] = frame[31 - 4*j -: 4];
      else            cw_b[4*(3 - j/2) +: 4] = frame[31 - 4*j -: 4];
    end
  end

  gbt_rs_dec u_dec_a (.cw(cw_a), .msg(msg_a), .corrected(cor_a), .uncorrectable(unc_a));
  gbt_rs_dec u_dec_b (.cw(cw_b), .msg(msg_b), .corrected(cor_b), .uncorrectable(unc_b));

  always_comb
    for (int j = 0; j < 22; j++)
      info[87 - 4*j -: 4] = (j % 2 == 0) ? msg_a[4*(10 - j/2) +: 4] : msg_b[4*(10 - j/2) +: 4];

  always_ff @(posedge clk) begin
    if (rst) begin
      sc <= '0; ttc <= '0; d <= '0;
      header_ok <= 1'b0; corrected <= 1'b0; uncorrectable <= 1'b0;
    end else if (valid) begin
      header_ok     <= (info[87:84] == HEADER);
      sc            <= info[83:80];
      ttc           <= info[79:64];
      d             <= info[63:0];
      corrected     <= cor_a || cor_b;
      uncorrectable <= unc_a || unc_b;
    end
  end

endmodule
