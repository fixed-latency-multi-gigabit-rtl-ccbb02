// sipo_ddr_tb: checks the double-data-rate deserialiser. A 2.5 Gb/s random
// bit stream (400 ps per bit) is driven with its bit centres on the edges of
// a 1.25 GHz HSCLK (800 ps), so each edge captures one bit. The word clock
// rises one picosecond after every fifth HSCLK rising edge, at one of the
// five possible phases (changed between runs). On each word clock the output
// must hold the last ten bits in arrival order, oldest in bit 0 and the bit
// taken at that rising edge in bit 9.
`timescale 1ps/1ps
module sipo_ddr_tb;
  logic hsclk = 1'b0, rxrecclk = 1'b0, sdata = 1'b0;
  logic [9:0] par;
  int checks = 0, failures = 0;
  logic bits [1000000];
  int nbit = 0;                       // bits sent so far

  sipo_ddr dut (.hsclk, .rxrecclk, .sdata, .par);

  // Bit i is valid from 400*i - 200 to 400*i + 200; HSCLK edges at 400*i.
  initial begin
    #200;
    forever begin
      sdata = 1'($urandom);
      bits[nbit] = sdata;
      #200;
      hsclk = ~hsclk;           // sampling edge in the bit centre
      nbit++;
      #200;
    end
  end

  int phase = 0, rises = 0;
  logic [9:0] want;
  always @(posedge hsclk) begin
    rises++;
    if (rises % 5 == phase) begin
      #1 rxrecclk = 1'b1;
      // Newest bit is the one just sampled on this rising edge.
      for (int j = 0; j < 10; j++) want[j] = bits[nbit - 10 + j];
      #1;
      if (rises > 20) begin
        checks++;
        if (par !== want) begin
          failures++;
          $display("FAIL @%0t phase %0d: par=%b want=%b", $time, phase, par, want);
        end
      end
      #1000 rxrecclk = 1'b0;
    end
  end

  initial begin
    for (int p = 0; p < 5; p++) begin
      phase = p;
      #400000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
