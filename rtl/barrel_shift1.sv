// barrel_shift1: one-bit barrel shifter after the receiver's SIPO.
//
// The recovered clock can only be moved in steps of two bits, so odd slide
// counts are completed by shifting the parallel word by one more bit. With
// sel (bit 0 of the slide counter) low the word passes unchanged; with sel
// high the output is {d[8:0], d9_prev}, where d9_prev is bit 9 of the word
// captured one clock earlier. The output therefore stays a contiguous window
// of the serial stream, one bit earlier than the input window, which adds one
// bit time of latency.
//
// Interface: d is the parallel register output, sampled on the recovered
// clock; q is combinational from d, sel and the one-bit history register.
// The shifter and its control by Q(0) follow the original design; taking
// the extra bit from the previous word is this design's reading of it.
`timescale 1ps/1ps
module barrel_shift1 (
  input  logic       clk,
  input  logic [9:0] d,
  input  logic       sel,
  output logic [9:0] q
);

  logic d9_prev;

  always_ff @(posedge clk) d9_prev <= d[9];

  assign q = sel ? {d[8:0], d9_prev} : d;

endmodule
