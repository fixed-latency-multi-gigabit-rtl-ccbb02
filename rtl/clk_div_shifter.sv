// clk_div_shifter: recovered-clock divider and phase shifter of the receiver PMA.
//
// This is the model of how the transceiver moves its recovered clock in
// response to RXSLIDE. HSCLK (half the bit rate) is divided by 5 to the word
// rate and the divided clock is fed through a 5-bit shift register clocked by
// HSCLK, so its five taps are the word clock at five phases two bits apart. A
// modulo-10 counter Q counts RXSLIDE assertions; Q(3:1) chooses the tap that
// becomes the recovered clock RXRECCLK and Q(0) drives the one-bit barrel
// shifter. Each pair of slides moves the capture point two bits earlier in
// the stream (tap (5 - Q(3:1)) mod 5), which shifts the parallel data two
// positions towards bit 9; the odd slide in between is done by the barrel
// shifter alone.
//
// The tap select follows Q only in an HSCLK cycle where both the old and the
// new tap are low, so switching never cuts a clock pulse short; the clock
// period in which the switch happens is shortened to four HSCLK periods.
// The divided clock is high for two of its five HSCLK periods. Those two
// details, and the direction of the phase step, are choices of this design.
//
// Interface: rxslide is synchronous to rxrecclk; each rising edge of it is
// one assertion. rst (synchronous to rxrecclk) clears Q, the transceiver
// reset, and returns the tap select to 0; the divider itself runs free.
`timescale 1ps/1ps
module clk_div_shifter (
  input  logic       hsclk,
  input  logic       rst,
  input  logic       rxslide,
  output logic       rxrecclk,
  output logic [3:0] q
);

  logic [2:0] div_cnt;
  logic [4:0] taps;
  logic [2:0] sel_hs;           // tap in use, HSCLK domain
  logic [2:0] sel_want;
  logic       slide_d;

  always_ff @(posedge hsclk) begin
    div_cnt <= (div_cnt >= 3'd4) ? 3'd0 : div_cnt + 1'b1;
    taps    <= {taps[3:0], (div_cnt < 3'd2)};
  end

  assign sel_want = (q[3:1] == 3'd0) ? 3'd0 : 3'd5 - q[3:1];

  always_ff @(posedge hsclk)
    if (rst || sel_hs > 3'd4)                   sel_hs <= '0;
    else if (!taps[sel_hs] && !taps[sel_want])  sel_hs <= sel_want;

  assign rxrecclk = taps[sel_hs];

  always_ff @(posedge rxrecclk) begin
    if (rst) begin
      q       <= '0;
      slide_d <= 1'b0;
    end else begin
      slide_d <= rxslide;
      if (rxslide && !slide_d) q <= (q == 4'd9) ? 4'd0 : q + 1'b1;
    end
  end

endmodule
