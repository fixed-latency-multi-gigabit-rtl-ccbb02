// sipo_ddr: serial-in parallel-out section of the receiver.
//
// The CDR delivers a half-rate clock (HSCLK, one period per two bits) and
// the stream is sampled on both of its edges. The DDR shift register is
// built from two 5-bit shift registers, one per edge, whose interleaving is
// the last ten received bits. A 10-bit register re-captures them on the
// rising edge of the recovered parallel clock, which is always one of
// HSCLK's rising edges. Bit 0 of the parallel word is the oldest bit, so the
// bit that leads the serial stream lands in bit 0.
//
// Interface: sdata is sampled on both edges of hsclk; par changes on the
// rising edge of rxrecclk.
// The DDR shift register feeding a word register on the recovered clock
// follows the receiver's published structure; building it from two
// single-edge registers and the bit order are this design's choices.
`timescale 1ps/1ps
module sipo_ddr (
  input  logic       hsclk,
  input  logic       rxrecclk,
  input  logic       sdata,
  output logic [9:0] par
);

  logic [4:0] sr_rise;  // bits sampled on rising edges, newest in bit 4
  logic [4:0] sr_fall;  // bits sampled on falling edges, newest in bit 4
  logic [9:0] word;

  always_ff @(posedge hsclk) sr_rise <= {sdata, sr_rise[4:1]};
  always_ff @(negedge hsclk) sr_fall <= {sdata, sr_fall[4:1]};

  // At a rising edge the newest bit came from sr_rise, the one before it
  // from sr_fall, and so on back to the oldest in sr_fall[0].
  always_comb
    for (int k = 0; k < 5; k++) begin
      word[2*k+1] = sr_rise[k];
      word[2*k]   = sr_fall[k];
    end

  always_ff @(posedge rxrecclk) par <= word;

endmodule
