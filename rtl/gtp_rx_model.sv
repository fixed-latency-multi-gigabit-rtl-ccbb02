// gtp_rx_model: behavioural model of the receive half of a GTP transceiver.
//
// Behavioural model, not synthesizable as a whole: it stands for the
// vendor's hard transceiver, with its receive PMA built after the model of
// how bit slipping works in PMA mode. The CDR (cdr_model) recovers HSCLK at
// half the bit rate; the SIPO (sipo_ddr) samples the stream on both HSCLK
// edges; the clock divider and shifter (clk_div_shifter) makes the recovered
// word clock RXRECCLK and moves its phase by two bits for every second
// RXSLIDE; the one-bit barrel shifter (barrel_shift1) does the odd slide.
// The internal comma aligner and 8b10b decoder are bypassed, so RXDATA is
// the raw 10-bit word.
//
// Latency (defaults, in recovered clock cycles): the bypassed comma detector
// (COMMA_LAT = 3) and the receive FIFO (FIFO_LAT = 5) on RXRECCLK, then the
// FPGA interface (IF_LAT = 2) on RXUSRCLK2, which the board drives from
// RXRECCLK. The receive PLL makes the CDR's seed clock at half the bit
// rate from CLKIN. The FIFO is modelled as a fixed delay line because both of its
// sides run on the recovered clock. RESET (from the fabric) clears the slide
// counter and makes the CDR lock again; the RX PLL lock gates the CDR too.
`timescale 1ps/1ps
module gtp_rx_model #(
  parameter int unsigned COMMA_LAT   = 3,
  parameter int unsigned FIFO_LAT    = 5,
  parameter int unsigned IF_LAT      = 2
) (
  input  logic       clkin,       // seed clock, 62.5 MHz
  input  logic       rxp,         // serial line
  input  logic       reset,       // transceiver reset from the fabric
  input  logic       rxslide,
  input  logic       rxusrclk2,
  output logic       rxrecclk,
  output logic       pll_lock,
  output logic       cdr_lock,
  output logic [3:0] slide_q,     // slide counter Q, for monitoring
  output logic [9:0] rxdata
);

  logic       seedclk;
  logic       hsclk;
  logic [9:0] par;
  logic [9:0] aligned_word;
  logic [1:0] rst_sync;
  logic [9:0] pipe_rec [COMMA_LAT + FIFO_LAT];
  logic [9:0] pipe_usr [IF_LAT];

  pll_model #(.MULT(20), .LOCK_CYCLES(8)) u_pll (
    .clkin  (clkin),
    .rst    (1'b0),
    .clk_out(seedclk),
    .lock   (pll_lock)
  );

  cdr_model u_cdr (
    .seed_hs(seedclk),
    .sdata  (rxp),
    .rst  (reset || !pll_lock),
    .hsclk(hsclk),
    .lock (cdr_lock)
  );

  always_ff @(posedge rxrecclk) rst_sync <= {rst_sync[0], reset};

  clk_div_shifter u_div (
    .hsclk   (hsclk),
    .rst     (rst_sync[1]),
    .rxslide (rxslide),
    .rxrecclk(rxrecclk),
    .q       (slide_q)
  );

  sipo_ddr u_sipo (
    .hsclk   (hsclk),
    .rxrecclk(rxrecclk),
    .sdata   (rxp),
    .par     (par)
  );

  barrel_shift1 u_bs (
    .clk(rxrecclk),
    .d  (par),
    .sel(slide_q[0]),
    .q  (aligned_word)
  );

  always_ff @(posedge rxrecclk) begin
    pipe_rec[0] <= aligned_word;
    for (int i = 1; i < int'(COMMA_LAT + FIFO_LAT); i++) pipe_rec[i] <= pipe_rec[i-1];
  end

  always_ff @(posedge rxusrclk2) begin
    pipe_usr[0] <= pipe_rec[COMMA_LAT + FIFO_LAT - 1];
    for (int i = 1; i < int'(IF_LAT); i++) pipe_usr[i] <= pipe_usr[i-1];
  end

  assign rxdata = pipe_usr[IF_LAT - 1];

endmodule
