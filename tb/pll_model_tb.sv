// pll_model_tb: checks the transceiver PLL model. With a 62.5 MHz reference
// (16 ns) and the default multiplier of 40, the output must toggle every
// 200 ps (2.5 GHz), its rising edges must fall 50 ps after each reference
// rising edge, lock must rise after eight reference periods, and reset must
// drop lock at once and stop the output. The half-rate instance (x20, as
// used for the receiver's seed clock) must run with an 800 ps period.
`timescale 1ps/1ps
module pll_model_tb;
  logic clkin = 1'b0, rst, clk_out, lock, clk_half, lock_half;
  int checks = 0, failures = 0;

  always #8000 clkin = ~clkin;

  pll_model dut (.clkin, .rst, .clk_out, .lock);
  pll_model #(.MULT(20)) u_half (.clkin, .rst, .clk_out(clk_half), .lock(lock_half));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  time t_last = 0, t_ref = 0, t_half = 0;
  int  bad_step = 0, steps = 0, bad_ref = 0, bad_half = 0;
  always @(posedge clkin) t_ref = $time;
  always @(clk_out) begin
    if (lock && !rst && t_last != 0) begin
      steps++;
      if ($time - t_last != 200) bad_step++;
      if (clk_out && (($time - t_ref) % 400) != 50) bad_ref++;
    end
    t_last = $time;
  end
  always @(posedge clk_half) begin
    if (lock_half && t_half != 0 && $time - t_half != 800) bad_half++;
    t_half = $time;
  end

  initial begin
    int n;
    rst = 1'b1;
    #40000 rst = 1'b0;
    n = 0;
    @(posedge clkin);
    while (!lock) begin @(posedge clkin); n++; end
    check(n >= 8 && n <= 10, $sformatf("lock after %0d reference periods", n));
    #2000000;
    check(steps > 9000 && bad_step == 0, $sformatf("%0d of %0d half periods wrong", bad_step, steps));
    check(bad_ref == 0, "output phase to the reference");
    check(bad_half == 0, "half-rate period");
    @(negedge clkin) rst = 1'b1;
    #1 check(!lock, "reset drops lock");
    begin
      time t0;
      t0 = t_last;
      #100000;
      check(t_last <= t0 + 16000, "no clock while reset");
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
