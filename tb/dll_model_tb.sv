// dll_model_tb: checks the fabric DLL model. From a 62.5 MHz reference the
// x4 output must run at 250 MHz (4 ns period, 2 ns high) and the x1 output at
// 62.5 MHz, both rising together with every reference rising edge once
// locked, so the user clock's phase to the reference is the same after every
// reset. Lock must follow four reference periods after reset.
`timescale 1ps/1ps
module dll_model_tb;
  logic clkin = 1'b0, rst, clk_x1, clk_x4, lock;
  int checks = 0, failures = 0;

  always #8000 clkin = ~clkin;

  dll_model dut (.clkin, .rst, .clk_x1, .clk_x4, .lock);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic watch = 1'b0;
  time t_ref = 0, t4 = 0, t1 = 0, t4f = 0;
  int  bad4 = 0, bad1 = 0, badph = 0, badw = 0, n4 = 0;
  always @(posedge clkin) t_ref = $time;
  always @(posedge clk_x4) begin
    if (!watch) t4 = 0;
    else if (t4 != 0) begin
      n4++;
      if ($time - t4 != 4000) bad4++;
      if (($time - t_ref) % 4000 != 0) badph++;
    end
    t4 = $time;
  end
  always @(negedge clk_x4) if (watch && t4 != 0 && $time - t4 != 2000) badw++;
  always @(posedge clk_x1) begin
    if (!watch) t1 = 0;
    else if (t1 != 0 && ($time - t1 != 16000 || $time != t_ref)) bad1++;
    t1 = $time;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      int n;
      watch = 1'b0;
      @(negedge clkin);
      rst = 1'b1;
      t4 = 0; t1 = 0;
      #(30000 + 1000 * r) rst = 1'b0;
      n = 0;
      @(posedge clkin);
      while (!lock) begin @(posedge clkin); n++; end
      check(n >= 4 && n <= 6, $sformatf("lock after %0d periods", n));
      @(negedge clkin) watch = 1'b1;
      #1000000;
    end
    check(n4 > 600 && bad4 == 0, $sformatf("x4 period: %0d of %0d wrong", bad4, n4));
    check(badw == 0, "x4 duty cycle");
    check(badph == 0, "x4 rises with the reference");
    check(bad1 == 0, "x1 period and phase");
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
