// gtp_tx_model: behavioural model of the transmit half of a GTP transceiver.
//
// Behavioural model, not synthesizable: it stands for the vendor's hard
// transceiver, configured as the fixed-latency link uses it. The data path
// is: FPGA interface register, 8b10b encoder (enc_8b10b), transmit FIFO in
// bypass (a single register), and the PISO, which loads a 10-bit code word
// once per word and shifts it out bit 0 first on the PLL's bit clock.
//
// The PISO's word clock XCLK is the bit clock divided by 10, and the divider
// comes up at a random phase (0..9 bits) at every PLL lock, so without
// correction the transmitter latency varies by up to one word. While TXPHASE
// is high the phase-alignment circuit forces the divider so that the PISO
// loads XCLK_OFFSET bits after each TXUSRCLK rising edge; after that the
// latency from TXDATA to the line is the same at every power-up.
//
// Latency (defaults): TXDATA is registered on TXUSRCLK2 (1 cycle), encoded
// (1 cycle), passes the bypassed FIFO (1 cycle) and is serialized (load half
// a word into the cycle, then ten bits). REFCLKOUT is CLKIN brought out to
// the fabric. pll_rst (power cycle or loss of lock) re-randomizes XCLK.
`timescale 1ps/1ps
module gtp_tx_model #(
  parameter int unsigned XCLK_OFFSET = 5
) (
  input  logic       clkin,       // reference clock, 62.5 MHz
  input  logic       pll_rst,
  output logic       refclkout,
  output logic       pll_lock,
  input  logic       txusrclk,    // 250 MHz, phase reference for alignment
  input  logic       txusrclk2,   // 250 MHz, clocks TXDATA in
  input  logic [7:0] txdata,
  input  logic       txcharisk,
  input  logic       txphase,
  output logic       txp          // serial line, one bit per 400 ps
);

  logic       bitclk;
  logic [7:0] if_data;
  logic       if_k;
  logic [9:0] enc_code;
  logic       enc_rd;
  logic [9:0] fifo_q;
  logic [9:0] sr;
  logic [3:0] div_cnt;          // XCLK divider, 0..9
  logic [3:0] usr_ph;           // bit slot since the last TXUSRCLK edge
  logic       usr_d;
  logic       lock_d;

  assign refclkout = clkin;

  pll_model #(.MULT(40)) u_pll (
    .clkin  (clkin),
    .rst    (pll_rst),
    .clk_out(bitclk),
    .lock   (pll_lock)
  );

  always_ff @(posedge txusrclk2) begin
    if_data <= txdata;
    if_k    <= txcharisk;
  end

  enc_8b10b u_enc (
    .clk (txusrclk),
    .rst (!pll_lock),
    .en  (1'b1),
    .data(if_data),
    .is_k(if_k),
    .code(enc_code),
    .rd  (enc_rd)
  );

  always_ff @(posedge txusrclk) fifo_q <= enc_code;

  // Serial section on the bit clock.
  always_ff @(posedge bitclk) begin
    logic [3:0] ph_next;
    logic [3:0] div_next;
    usr_d   <= txusrclk;
    lock_d  <= pll_lock;
    ph_next = (txusrclk && !usr_d) ? 4'd0 : ((usr_ph == 4'd9) ? 4'd0 : usr_ph + 1'b1);
    usr_ph  <= ph_next;
    if (!lock_d)
      div_next = 4'($urandom % 10);              // phase after each lock
    else if (txphase)
      div_next = 4'((int'(ph_next) + 10 - int'(XCLK_OFFSET)) % 10);
    else
      div_next = (div_cnt == 4'd9) ? 4'd0 : div_cnt + 1'b1;
    div_cnt <= div_next;
    if (div_next == 4'd0) sr <= fifo_q;
    else                  sr <= {1'b0, sr[9:1]};
  end

  assign txp = sr[0];

endmodule
