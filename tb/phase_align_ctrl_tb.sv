// phase_align_ctrl_tb: checks the transmit phase-alignment sequencer with
// small wait and alignment counts (WAIT_CYCLES=5, ALIGN_CYCLES=20). From the
// clock on which PLL lock is raised, TXPHASE must rise after the two-flop
// synchroniser, one state change and the wait (2+1+5 = 8 clocks), stay high
// for exactly 20 clocks, and be followed by tx_ready. Loss of lock must drop
// tx_ready at once (after the synchroniser) and a new lock must repeat the
// whole sequence. The default-parameter instance is checked for its
// 8192-clock alignment window.
`timescale 1ps/1ps
module phase_align_ctrl_tb;
  logic clk = 1'b0, rst, lock;
  logic txphase, tx_ready, txphase_d, tx_ready_d;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  phase_align_ctrl #(.WAIT_CYCLES(5), .ALIGN_CYCLES(20)) dut
    (.clk, .rst, .pll_lock(lock), .txphase, .tx_ready);
  phase_align_ctrl u_def (.clk, .rst, .pll_lock(lock), .txphase(txphase_d), .tx_ready(tx_ready_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic run_lock;
    int t_rise, width, c;
    lock = 1'b1;
    c = 0; t_rise = -1; width = 0;
    while (!tx_ready && c < 100) begin
      @(posedge clk); #1; c++;
      if (txphase && t_rise < 0) t_rise = c;
      if (txphase) width++;
    end
    check(t_rise == 8, $sformatf("TXPHASE rose after %0d clocks", t_rise));
    check(width == 20, $sformatf("TXPHASE high for %0d clocks", width));
    check(tx_ready && !txphase, "ready after alignment");
  endtask

  initial begin
    int w;
    rst = 1'b1; lock = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) begin @(posedge clk); #1; check(!txphase && !tx_ready, "idle without lock"); end
    @(negedge clk);
    run_lock();
    repeat (10) begin @(posedge clk); #1; check(tx_ready && !txphase, "ready holds"); end
    @(negedge clk) lock = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(!tx_ready && !txphase, "lock loss drops ready");
    @(negedge clk);
    run_lock();
    // Default instance: 8192 clocks of TXPHASE.
    w = 0;
    while (!tx_ready_d) begin @(posedge clk); #1; if (txphase_d) w++; end
    check(w == 8192, $sformatf("default TXPHASE width %0d", w));
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
