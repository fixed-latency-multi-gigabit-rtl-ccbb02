// dll_model: behavioural model of the fabric clock manager (DLL) of the transmitter.
//
// Behavioural model, not synthesizable: it stands for the FPGA's DLL clock
// manager. It takes the transceiver's REFCLKOUT, and delivers clk_x1 (the
// deskewed reference) and clk_x4 (four times its frequency), the transmit
// user clock TXUSRCLK/TXUSRCLK2. Both outputs rise together with clkin, so
// at every power-up the user clock has the same phase offset to the
// reference, which is what the DLL is there for. lock rises after
// LOCK_CYCLES input periods; rst drops it and stops the outputs.
`timescale 1ps/1ps
module dll_model #(
  parameter int unsigned CLKIN_PERIOD_PS = 16000,
  parameter int unsigned LOCK_CYCLES     = 4
) (
  input  logic clkin,
  input  logic rst,
  output logic clk_x1,
  output logic clk_x4,
  output logic lock
);

  localparam int unsigned Q_PS = CLKIN_PERIOD_PS / 8;   // half period of clk_x4

  int unsigned lock_cnt;

  initial begin
    clk_x1   = 1'b0;
    clk_x4   = 1'b0;
    lock     = 1'b0;
    lock_cnt = 0;
  end

  always @(posedge clkin or posedge rst) begin
    if (rst) begin
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
      clk_x1 = 1'b1;
      clk_x4 = 1'b1;
      for (int i = 1; i < 8; i++) begin
        #(Q_PS);
        clk_x4 = ~clk_x4;
        if (i == 4) clk_x1 = 1'b0;
      end
    end
  end

endmodule
