// clk_div_shifter_tb: checks the recovered-clock divider and phase shifter.
// HSCLK runs at 1.25 GHz (800 ps). The recovered clock must run at HSCLK/5
// (4000 ps, the 250 MHz word rate) with high and low phases of at least two
// HSCLK periods, also while its phase is being moved. RXSLIDE is pulsed for
// one recovered-clock cycle at a time; each pulse must add one to the mod-10
// counter q, and the clock phase, measured in HSCLK periods modulo 5, must be
// phase0 - floor(q/2): odd counts leave the clock alone (their one-bit shift
// is made in the data path) and each even count moves it two bits earlier.
// A reset must clear q and return the clock to its starting tap.
`timescale 1ps/1ps
module clk_div_shifter_tb;
  logic hsclk = 1'b0, rst, rxslide;
  logic rxrecclk;
  logic [3:0] q;
  int checks = 0, failures = 0;

  always #400 hsclk = ~hsclk;

  clk_div_shifter dut (.hsclk, .rst, .rxslide, .rxrecclk, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Pulse-width monitor.
  time t_r = 0, t_f = 0;
  always @(posedge rxrecclk) begin
    if (t_f > 0) check($time - t_f >= 1600, $sformatf("low phase %0t", $time - t_f));
    t_r = $time;
  end
  always @(negedge rxrecclk) begin
    if (t_r > 0) check($time - t_r >= 1600, $sformatf("high phase %0t", $time - t_r));
    t_f = $time;
  end

  // Phase of the recovered clock in HSCLK periods, and its period.
  function automatic int phase_now();
    return int'((t_r / 800) % 5);
  endfunction

  task automatic settle_and_check_period;
    time a;
    repeat (6) @(posedge rxrecclk);
    a = $time;
    @(posedge rxrecclk);
    check($time - a == 4000, $sformatf("period %0t", $time - a));
  endtask

  initial begin
    int ph0;
    rst = 1'b1; rxslide = 1'b0;
    repeat (20) @(posedge hsclk);
    rst = 1'b0;
    settle_and_check_period();
    ph0 = phase_now();
    for (int i = 1; i <= 23; i++) begin
      @(posedge rxrecclk) #1 rxslide = 1'b1;
      @(posedge rxrecclk) #1 rxslide = 1'b0;
      settle_and_check_period();
      check(int'(q) == i % 10, $sformatf("q=%0d after %0d slides", q, i));
      check(phase_now() == (ph0 - int'(q) / 2 + 5) % 5,
            $sformatf("phase %0d with q=%0d, start %0d", phase_now(), q, ph0));
    end
    rst = 1'b1;
    repeat (20) @(posedge hsclk);
    rst = 1'b0;
    settle_and_check_period();
    check(q == 4'd0, "reset clears q");
    check(phase_now() == ph0, "reset restores the starting phase");
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
