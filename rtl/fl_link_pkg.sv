// fl_link_pkg: constants and types shared by the fixed-latency serial link.
//
// The link carries 8b10b-coded symbols at 2.5 Gb/s: 10-bit code words, one
// per 4 ns cycle of the 250 MHz user clock. Code words are held with bit 'a'
// of the 8b10b code in bit 0 and are sent bit 0 first; this ordering is a
// choice of this design. The K28.5 symbol is the periodic alignment
// character; its first seven bits form the comma that the receiver searches.
`timescale 1ps/1ps
package fl_link_pkg;

  // One payload symbol: a data byte or, with is_k set, a control character.
  typedef struct packed {
    logic       is_k;
    logic [7:0] data;
  } sym_t;

  localparam int unsigned CODE_W = 10;  // 8b10b code word width
  localparam int unsigned DATA_W = 8;   // payload byte width

  localparam logic [7:0] K28_5      = 8'hBC;       // K28.5 = 101 11100
  localparam logic [9:0] K28_5_RDN  = 10'h17C;     // abcdei fghj = 001111 1010
  localparam logic [9:0] K28_5_RDP  = 10'h283;     // abcdei fghj = 110000 0101

  // Comma: bits a..f of K28.5 (0011111 or 1100000 in transmission order),
  // written here as bit vectors with the first transmitted bit in bit 0.
  localparam logic [6:0] COMMA_RDN  = 7'b1111100;
  localparam logic [6:0] COMMA_RDP  = 7'b0000011;

endpackage
