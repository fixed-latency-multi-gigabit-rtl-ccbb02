// pll_model: behavioural model of the transceiver tile's shared PLL.
//
// Behavioural model, not synthesizable: it stands for the analog PLL inside
// the transceiver tile. It locks to the reference clock CLKIN and produces a
// clock MULT times faster whose rising edges fall OUT_DELAY_PS after each
// CLKIN rising edge, so the output keeps a fixed phase to CLKIN. Each CLKIN
// period starts a fresh burst of MULT output periods, which keeps the model
// from drifting. lock rises after LOCK_CYCLES reference periods out of reset
// and falls at once when rst is asserted; no clock is driven while unlocked.
//
// Defaults: 62.5 MHz reference, times 40, gives the 2.5 GHz bit clock of the
// link (one period per transmitted bit). The model drives a full-rate bit
// clock rather than a half-rate clock; the lock time and output delay are
// choices of this model.
`timescale 1ps/1ps
module pll_model #(
  parameter int unsigned MULT            = 40,
  parameter int unsigned CLKIN_PERIOD_PS = 16000,
  parameter int unsigned LOCK_CYCLES     = 8,
  parameter int unsigned OUT_DELAY_PS    = 50
) (
  input  logic clkin,
  input  logic rst,
  output logic clk_out,
  output logic lock
);

  localparam int unsigned HALF_PS = CLKIN_PERIOD_PS / (2 * MULT);

  int unsigned lock_cnt;

  initial begin
    clk_out  = 1'b0;
    lock     = 1'b0;
    lock_cnt = 0;
  end

  always @(posedge clkin or posedge rst) begin
    if (rst == 1'b1) begin
      lock     <= 1'b0;
      lock_cnt <= 0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt <= lock_cnt + 1;
    end else begin
      lock <= 1'b1;
    end
  end

  always @(posedge clkin) begin
    if (lock && !rst) begin
      #(OUT_DELAY_PS);
      clk_out = 1'b1;
      repeat (2 * MULT - 1) begin
        #(HALF_PS);
        clk_out = ~clk_out;
      end
    end
  end

endmodule
