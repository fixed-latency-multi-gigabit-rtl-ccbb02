// payload_gen: programmable payload pattern generator of the transmitter board.
//
// The generator plays a circular pattern of PATTERN_LEN symbols, each a data
// byte or a control character, into the transceiver at one symbol per user
// clock. Entry 0 holds K28.5 after reset, so the comma the receiver aligns to
// is sent once per pattern; the other entries start as data bytes equal to
// their index. Any entry can be rewritten through the write port, which lets
// the pattern be programmed with other data and control symbols.
//
// Interface: tx_sym is registered and changes every clk cycle once enabled;
// frame_start is high in the cycle tx_sym carries entry 0 and payload_bit is
// bit 0 of the data byte, a single test bit to watch on an instrument. A
// write (wr_en, wr_addr, wr_sym) takes effect on the next clock.
// The pattern length and the reset contents are this design's choice.
`timescale 1ps/1ps
module payload_gen
  import fl_link_pkg::*;
#(
  parameter int unsigned PATTERN_LEN = 16
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            en,
  input  logic                            wr_en,
  input  logic [$clog2(PATTERN_LEN)-1:0]  wr_addr,
  input  sym_t                            wr_sym,
  output sym_t                            tx_sym,
  output logic                            frame_start,
  output logic                            payload_bit
);

  localparam int unsigned AW = $clog2(PATTERN_LEN);

  sym_t          pattern [PATTERN_LEN];
  logic [AW-1:0] rd_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(PATTERN_LEN); i++)
        pattern[i] <= (i == 0) ? sym_t'{is_k: 1'b1, data: K28_5}
                               : sym_t'{is_k: 1'b0, data: 8'(i)};
    end else if (wr_en) begin
      pattern[wr_addr] <= wr_sym;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_addr     <= '0;
      tx_sym      <= '0;
      frame_start <= 1'b0;
    end else if (en) begin
      tx_sym      <= pattern[rd_addr];
      frame_start <= (rd_addr == '0);
      rd_addr     <= (rd_addr == AW'(PATTERN_LEN - 1)) ? '0 : rd_addr + 1'b1;
    end
  end

  assign payload_bit = tx_sym.data[0];

endmodule
