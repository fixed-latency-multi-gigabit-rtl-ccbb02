// cdr_model_tb: checks the CDR model. A random 2.5 Gb/s stream (400 ps bits)
// is sent with its transitions 137 ps after the grid of an 800 ps seed clock.
// After every lock, each HSCLK edge, rising or falling, must fall in the
// middle of a bit (337 ps modulo 400 after the grid), HSCLK must run with an
// 800 ps period, and over many relocks both choices of which bits fall on
// rising edges must occur (this is what later gives odd and even word
// offsets). lock must drop with rst and return after it.
`timescale 1ps/1ps
module cdr_model_tb;
  logic seed = 1'b0, sdata = 1'b0, rst, hsclk, lock;
  int checks = 0, failures = 0;

  always #400 seed = ~seed;

  cdr_model dut (.seed_hs(seed), .sdata, .rst, .hsclk, .lock);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #137;
    forever begin
      sdata = 1'($urandom);
      #400;
    end
  end

  time t_r = 0;
  int  bad_mid = 0, bad_per = 0, edges = 0;
  logic watch = 1'b0;
  always @(hsclk) if (watch) begin
    edges++;
    if ((($time - 137) % 400) != 200) bad_mid++;
  end
  always @(posedge hsclk) begin
    if (watch && t_r != 0 && $time - t_r != 800) bad_per++;
    t_r = $time;
  end

  initial begin
    int par_seen [2];
    par_seen[0] = 0; par_seen[1] = 0;
    for (int r = 0; r < 16; r++) begin
      watch = 1'b0;
      rst = 1'b1;
      #1 check(!lock, "rst drops lock");
      #(5000 + 400 * ($urandom % 7)) rst = 1'b0;
      wait (lock === 1'b1);
      #8000;
      t_r = 0;
      watch = 1'b1;
      #40000;
      // Which bits (even or odd on the 400 ps grid) land on rising edges.
      par_seen[int'(((t_r - 137 - 200) / 400) % 2)]++;
    end
    check(edges > 1000 && bad_mid == 0, $sformatf("%0d of %0d edges off the bit centre", bad_mid, edges));
    check(bad_per == 0, "HSCLK period");
    check(par_seen[0] > 0 && par_seen[1] > 0, "both bit parities on rising edges");
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
