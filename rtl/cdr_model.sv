// cdr_model: behavioural model of the receiver's clock and data recovery.
//
// Behavioural model, not synthesizable: it stands for the analog CDR of the
// transceiver. It produces HSCLK, a half-rate clock (one period per two
// bits) whose two edges sample the middle of each bit. HSCLK is the seed
// clock from the receive PLL (seed_hs, already at the half bit rate) delayed
// by a phase chosen at lock: each seed_hs period is re-emitted, delayed by
// 0 .. 2*UI_PS-1 ps, by a small timed block.
//
// Locking: after rst falls, at the next seed_hs edge, the model takes the time
// of the last transition of the stream and picks the delay that puts an HSCLK
// edge half a bit after it, with a random choice of whether the stream bits
// that fall on rising edges are the even or the odd ones. It then drops a
// random number (0..4) of HSCLK periods, as a real CDR's lock time would.
// Together these give each lock a random word phase among the ten possible
// ones once the clock is divided by 5, as happens after every reset of the
// real device. HSCLK keeps running while rst is held, so logic clocked from
// the recovered clock keeps running. The seed clock is assumed to have the
// transmitter's exact frequency; frequency offset and jitter are not modelled.
`timescale 1ps/1ps
module cdr_model #(
  parameter int unsigned UI_PS = 400
) (
  input  logic seed_hs,     // seed clock at half the bit rate
  input  logic sdata,
  input  logic rst,
  output logic hsclk,
  output logic lock
);

  longint      last_edge;
  longint      dly;          // delay of HSCLK behind seed_hs, 0 .. 2*UI_PS-1
  int unsigned skip;
  logic        relock_req;

  initial begin
    hsclk      = 1'b0;
    lock       = 1'b0;
    relock_req = 1'b1;
    last_edge  = 0;
    dly        = 0;
    skip       = 0;
  end

  always @(posedge sdata or negedge sdata) last_edge = longint'($time);

  always @(posedge rst) begin
    relock_req = 1'b1;
    lock       = 1'b0;
  end

  always @(posedge seed_hs) begin
    if (relock_req && !rst && last_edge != 0) begin
      longint ui;
      ui         = longint'(UI_PS);
      dly        = (((last_edge + ui / 2 - longint'($time)) % ui) + ui) % ui
                   + ui * longint'($urandom % 2);
      skip       = $urandom % 5;
      relock_req = 1'b0;
      lock       = 1'b1;
    end
    if (skip != 0) begin
      skip = skip - 1;
    end else if (dly < longint'(UI_PS)) begin
      #(dly);
      hsclk = 1'b1;
      #(UI_PS);
      hsclk = 1'b0;
    end else begin
      #(dly - longint'(UI_PS));
      hsclk = 1'b0;
      #(UI_PS);
      hsclk = 1'b1;
    end
  end

endmodule
