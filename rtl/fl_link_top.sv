// fl_link_top: fixed-latency serial link, transmitter board and receiver board.
//
// A 2.5 Gb/s 8b10b link whose latency, from the payload entering the
// transmitter to the decoded payload leaving the receiver, and whose
// recovered-clock phase are the same after every reset, loss of lock or
// power cycle. Two places in a standard transceiver make them vary, and each
// is fixed here by fabric logic around the transceiver:
//   * Transmitter: the serializer's word clock comes up at a random phase.
//     phase_align_ctrl runs the transceiver's phase-alignment circuit
//     (TXPHASE) so the word clock is locked to TXUSRCLK, which the DLL makes
//     from REFCLKOUT with a fixed phase; the transmit FIFO is bypassed.
//   * Receiver: the CDR locks at a random bit phase. The transceiver's comma
//     aligner is off; comma_aligner finds the comma in the raw data, rejects
//     locks that need an odd number of bit slips by resetting the
//     transceiver, and applies even slip counts through RXSLIDE, which moves
//     the recovered clock. Decoding is done in the fabric by dec_8b10b.
// The transceiver halves, PLL and DLL are behavioural models (gtp_tx_model,
// gtp_rx_model, dll_model), so this top simulates but is not synthesizable
// as a whole; the fabric blocks are.
//
// Ports: the two boards share nothing but the serial line, which is brought
// out (txp, rxp) so that a cable of any delay can be placed between them.
// tx_refclk is the 62.5 MHz reference, rx_seedclk the receiver's 62.5 MHz
// seed clock. tx_pll_rst models a transmitter power cycle, tx_rst and rx_rst
// are the fabric resets. rx_recclk is the recovered 250 MHz data clock;
// rx_sym, rx_code_err and rx_aligned are synchronous to it. The pattern
// write port is synchronous to tx_usrclk.
//
// Beside the link sits the frame builder of the GBT link that such fixed-
// latency links are meant to carry (gbt_frame_tx): 120-bit frames of header,
// slow control, TTC, data and Reed-Solomon check symbols, one per 25 ns on
// gbt_clk, and the matching unpacker and corrector (gbt_frame_rx), whose
// frame input is a port so that any channel can be placed between them, and
// the 32 e-links (gbt_elink) that carry the corrected data field to the
// front-end chips at 80 Mb/s each. They
// have their own ports and is not connected to the 2.5 Gb/s link,
// whose line rate is too low for the 4.8 Gb/s frame stream.
`timescale 1ps/1ps
module fl_link_top
  import fl_link_pkg::*;
#(
  parameter int unsigned PATTERN_LEN  = 16,
  parameter int unsigned ALIGN_CYCLES = 8192
) (
  // transmitter board
  input  logic                           tx_refclk,
  input  logic                           tx_pll_rst,
  input  logic                           tx_rst,
  input  logic                           pat_wr_en,
  input  logic [$clog2(PATTERN_LEN)-1:0] pat_wr_addr,
  input  sym_t                           pat_wr_sym,
  output logic                           tx_refclkout,
  output logic                           tx_usrclk,
  output logic                           tx_ready,
  output logic                           tx_phase,
  output sym_t                           tx_sym,
  output logic                           tx_frame_start,
  output logic                           tx_payload_bit,
  output logic                           txp,
  // receiver board
  input  logic                           rx_seedclk,
  input  logic                           rx_rst,
  input  logic                           rxp,
  output logic                           rx_recclk,
  output sym_t                           rx_sym,
  output logic                           rx_code_err,
  output logic                           rx_aligned,
  output logic                           rx_reject,
  output logic                           rx_slide,
  output logic [3:0]                     rx_last_n,
  // GBT frame builder (40 MHz bunch-crossing clock)
  input  logic                           gbt_clk,
  input  logic                           gbt_rst,
  input  logic                           gbt_valid,
  input  logic [3:0]                     gbt_sc,
  input  logic [15:0]                    gbt_ttc,
  input  logic [63:0]                    gbt_d,
  output logic [119:0]                   gbt_frame,
  input  logic [119:0]                   gbt_rx_frame,
  output logic [3:0]                     gbt_rx_sc,
  output logic [15:0]                    gbt_rx_ttc,
  output logic [63:0]                    gbt_rx_d,
  output logic                           gbt_rx_header_ok,
  output logic                           gbt_rx_corrected,
  output logic                           gbt_rx_uncorrectable,
  // E-links (80 MHz)
  input  logic                           gbt_clk80,
  input  logic                           gbt_frame_stb,
  output logic [31:0]                    gbt_elink_dout,
  input  logic [31:0]                    gbt_elink_din,
  output logic [63:0]                    gbt_elink_d_in
);

  // ---------------- transmitter ----------------
  logic tx_pll_lock, dll_lock, dll_x1;

  dll_model u_dll (
    .clkin (tx_refclkout),
    .rst   (tx_pll_rst),
    .clk_x1(dll_x1),
    .clk_x4(tx_usrclk),
    .lock  (dll_lock)
  );

  payload_gen #(.PATTERN_LEN(PATTERN_LEN)) u_gen (
    .clk        (tx_usrclk),
    .rst        (tx_rst),
    .en         (1'b1),
    .wr_en      (pat_wr_en),
    .wr_addr    (pat_wr_addr),
    .wr_sym     (pat_wr_sym),
    .tx_sym     (tx_sym),
    .frame_start(tx_frame_start),
    .payload_bit(tx_payload_bit)
  );

  phase_align_ctrl #(.ALIGN_CYCLES(ALIGN_CYCLES)) u_pac (
    .clk     (tx_usrclk),
    .rst     (tx_rst),
    .pll_lock(tx_pll_lock && dll_lock),
    .txphase (tx_phase),
    .tx_ready(tx_ready)
  );

  gtp_tx_model u_gtp_tx (
    .clkin    (tx_refclk),
    .pll_rst  (tx_pll_rst),
    .refclkout(tx_refclkout),
    .pll_lock (tx_pll_lock),
    .txusrclk (tx_usrclk),
    .txusrclk2(tx_usrclk),
    .txdata   (tx_sym.data),
    .txcharisk(tx_sym.is_k),
    .txphase  (tx_phase),
    .txp      (txp)
  );

  // ---------------- receiver ----------------
  logic       gtp_rx_reset, rxslide, rx_pll_lock, rx_cdr_lock;
  logic [3:0] slide_q;
  logic [9:0] rxdata_raw;

  gtp_rx_model u_gtp_rx (
    .clkin    (rx_seedclk),
    .rxp      (rxp),
    .reset    (gtp_rx_reset),
    .rxslide  (rxslide),
    .rxusrclk2(rx_recclk),
    .rxrecclk (rx_recclk),
    .pll_lock (rx_pll_lock),
    .cdr_lock (rx_cdr_lock),
    .slide_q  (slide_q),
    .rxdata   (rxdata_raw)
  );

  comma_aligner u_align (
    .clk      (rx_recclk),
    .rst      (rx_rst),
    .rxdata   (rxdata_raw),
    .rxslide  (rxslide),
    .gtp_reset(gtp_rx_reset),
    .aligned  (rx_aligned),
    .reject   (rx_reject),
    .slide    (rx_slide),
    .last_n   (rx_last_n)
  );

  dec_8b10b u_dec (
    .clk     (rx_recclk),
    .rst     (rx_rst),
    .en      (1'b1),
    .code    (rxdata_raw),
    .data    (rx_sym.data),
    .is_k    (rx_sym.is_k),
    .code_err(rx_code_err)
  );

  // GBT frame builder: stands beside the link, sharing no signal with it.
  gbt_frame_tx u_gbt_tx (
    .clk  (gbt_clk),
    .rst  (gbt_rst),
    .valid(gbt_valid),
    .sc   (gbt_sc),
    .ttc  (gbt_ttc),
    .d    (gbt_d),
    .frame(gbt_frame)
  );

  gbt_frame_rx u_gbt_rx (
    .clk          (gbt_clk),
    .rst          (gbt_rst),
    .valid        (gbt_valid),
    .frame        (gbt_rx_frame),
    .sc           (gbt_rx_sc),
    .ttc          (gbt_rx_ttc),
    .d            (gbt_rx_d),
    .header_ok    (gbt_rx_header_ok),
    .corrected    (gbt_rx_corrected),
    .uncorrectable(gbt_rx_uncorrectable)
  );

  // E-links: the corrected data field goes out to the front ends two bits
  // per link; the return direction is gathered on gbt_elink_d_in.
  gbt_elink u_elink (
    .clk80     (gbt_clk80),
    .rst       (gbt_rst),
    .frame_stb (gbt_frame_stb),
    .d_out     (gbt_rx_d),
    .elink_dout(gbt_elink_dout),
    .elink_din (gbt_elink_din),
    .d_in      (gbt_elink_d_in)
  );

endmodule
