// barrel_shift1_tb: checks the one-bit shifter of the receiver model. With
// sel low the output must equal the input word; with sel high it must be the
// input moved up one bit with bit 9 of the previous word in bit 0, i.e. the
// 10-bit window one bit earlier in the stream. Random words and random sel.
`timescale 1ps/1ps
module barrel_shift1_tb;
  logic clk = 1'b0, sel;
  logic [9:0] d, q, prev;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  barrel_shift1 dut (.clk, .d, .sel, .q);

  initial begin
    d = '0; sel = 1'b0;
    @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) begin
      prev = d;
      d   = 10'($urandom);
      sel = 1'($urandom);
      #1;
      checks++;
      if (q !== (sel ? {d[8:0], prev[9]} : d)) begin
        failures++;
        $display("FAIL: d=%h prev=%h sel=%0d q=%h", d, prev, sel, q);
      end
      @(posedge clk); #1;
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
