// gbt_elink_tb: checks the e-link ports at their default width of 32 links.
// An 80 MHz clock (12.5 ns) and a frame strobe on every second cycle model
// the 40 MHz frame. For each of 500 random 64-bit data words the testbench
// samples every line: link i must carry bit 2i+1 of the word in the first
// clock after the strobe and bit 2i in the second, i.e. 80 Mb/s per link.
// The lines are looped back to the inputs, and the same word must come out
// on d_in one frame (two clocks) after the line carried it.
`timescale 1ps/1ps
module gbt_elink_tb;
  logic clk80 = 1'b0, rst, frame_stb;
  logic [63:0] d_out, d_in;
  logic [31:0] elink_dout;
  int checks = 0, failures = 0;

  always #6250 clk80 = ~clk80;

  gbt_elink dut (.clk80, .rst, .frame_stb, .d_out, .elink_dout, .elink_din(elink_dout), .d_in);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    logic [63:0] w, prev;
    rst = 1'b1; frame_stb = 1'b0; d_out = '0;
    repeat (3) @(posedge clk80);
    #1 rst = 1'b0;
    prev = '0;
    for (int f = 0; f < 500; f++) begin
      w = {$urandom, $urandom};
      d_out = w; frame_stb = 1'b1;
      @(posedge clk80); #1;
      frame_stb = 1'b0;
      for (int i = 0; i < 32; i++) check(elink_dout[i] == w[2*i+1], "first bit of a link");
      if (f > 0) check(d_in == prev, $sformatf("loop-back word %0d", f - 1));
      @(posedge clk80); #1;
      for (int i = 0; i < 32; i++) check(elink_dout[i] == w[2*i], "second bit of a link");
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
