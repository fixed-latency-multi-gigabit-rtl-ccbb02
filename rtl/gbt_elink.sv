// gbt_elink: the 32 e-link ports of the GBT, data direction and return path.
//
// Each e-link is a clock-synchronous serial link at 80 Mb/s. The 64-bit data
// field of a 25 ns GBT frame is spread over the 32 links, two bits per link
// per frame (64 bits x 40 MHz = 32 x 80 Mb/s): link i sends bits 2i+1 and 2i
// of d_out, in that order. The return direction gathers two bits per link
// into d_in the same way. Links can be grouped for a device that needs more
// than 80 Mb/s simply by giving it several adjacent bit pairs of D.
//
// Interface: everything runs on the 80 MHz e-link clock clk80; frame_stb
// is high on every second clk80 cycle, at the start of each 25 ns frame.
// d_out is taken in when frame_stb is high, and its first bits appear on
// elink_dout one clock later. elink_din is sampled every clock; the two bits
// received in the frame's two cycles are delivered on d_in at the next
// frame_stb, so a loop from dout to din returns d_out one frame (two clk80
// cycles) later. The clock and strobe lines themselves, and the
// differential pairs, are outside this logic. The bit-to-link mapping is
// this design's choice.
`timescale 1ps/1ps
module gbt_elink #(
  parameter int unsigned N_ELINKS = 32
) (
  input  logic                  clk80,
  input  logic                  rst,
  input  logic                  frame_stb,
  input  logic [2*N_ELINKS-1:0] d_out,
  output logic [N_ELINKS-1:0]   elink_dout,
  input  logic [N_ELINKS-1:0]   elink_din,
  output logic [2*N_ELINKS-1:0] d_in
);

  logic [N_ELINKS-1:0] second;   // bit 2i waiting for the second cycle
  logic [N_ELINKS-1:0] first;    // bit 2i+1 received in the first cycle

  always_ff @(posedge clk80) begin
    if (rst) begin
      elink_dout <= '0;
      second     <= '0;
      first      <= '0;
      d_in       <= '0;
    end else begin
      first <= elink_din;
      if (frame_stb) begin
        for (int i = 0; i < int'(N_ELINKS); i++) begin
          elink_dout[i] <= d_out[2*i+1];
          second[i]     <= d_out[2*i];
          d_in[2*i+1]   <= first[i];
          d_in[2*i]     <= elink_din[i];
        end
      end else begin
        elink_dout <= second;
      end
    end
  end

endmodule
