// gbt_frame_tx: builds the 120-bit GBT frame once per 40 MHz clock.
//
// Each bunch-crossing clock the frame carries a 4-bit header, 4 bits of slow
// control, 16 bits of timing and trigger control and 64 bits of data,
// protected by a 32-bit FEC field: 120 bits per 25 ns, 4.8 Gb/s on the line.
// The 88 bits of H, SC, TTC and D are cut into 22 four-bit symbols and
// interleaved over two RS(15,11) codewords: symbol j (j = 0 is the most
// significant) goes to codeword j mod 2. Each codeword's four check symbols
// come from gbt_rs_enc, and the FEC field holds them interleaved the same
// way. Interleaving lets the pair correct any burst of up to 13 adjacent
// wrong bits (16 if it starts on a symbol boundary). The field order and widths follow the GBT frame; the header
// value and the interleaving pattern are this design's choices.
//
// Interface: sc, ttc and d are sampled on clk (40 MHz) when valid is high;
// frame is registered, one clock of latency, bit 119 sent first. rst clears
// the frame register; the header is present in every frame after reset.
`timescale 1ps/1ps
module gbt_frame_tx
  import gbt_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                valid,
  input  logic [SC_W-1:0]     sc,
  input  logic [TTC_W-1:0]    ttc,
  input  logic [D_W-1:0]      d,
  output logic [FRAME_W-1:0]  frame
);

  logic [87:0] info;
  logic [43:0] msg_a, msg_b;
  logic [15:0] par_a, par_b;
  logic [31:0] fec;

  assign info = {HEADER, sc, ttc, d};

  // Symbol j (from the top) of info into codeword j mod 2, position 10 - j/2.
  always_comb
    for (int j = 0; j < 22; j++) begin
      if (j % 2 == 0) msg_a[4*(10 - j/2) +: 4] = info[87 - 4*j -: 4];
      else            msg_b[4*(10 - j/2) +: 4] = info[87 - 4*j -: 4];
    end

  gbt_rs_enc u_rs_a (.msg(msg_a), .par(par_a));
  gbt_rs_enc u_rs_b (.msg(msg_b), .par(par_b));

  always_comb
    for (int j = 0; j < 8; j++)
      fec[31 - 4*j -: 4] = (j % 2 == 0) ? par_a[4*(3 - j/2) +: 4] : par_b[4*(3 - j/2) +: 4];

  always_ff @(posedge clk) begin
    if (rst)        frame <= {HEADER, {(FRAME_W - H_W){1'b0}}};
    else if (valid) frame <= {info, fec};
  end

endmodule
