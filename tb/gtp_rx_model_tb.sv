// gtp_rx_model_tb: checks the receive transceiver model on its own.
//
// The line carries 16-symbol frames of K28.5 (alternating disparity) and
// balanced D21.5/D10.2 symbols, 400 ps per bit, bit 0 first, with an
// arbitrary 137 ps offset to the reference clock. RXUSRCLK2 is tied to the
// recovered clock, as on the board. For each received word the testbench
// finds the comma in the 20-bit window {word, previous word} and notes its
// offset p (the symbols start p bits into each word). Expected behaviour,
// from the bit-slip model: the recovered clock runs at 250 MHz; p is the
// same for every frame; one RXSLIDE pulse moves p to (p + 1) mod 10; a
// reset lets the CDR lock again at a random bit phase, so p changes between
// resets. The testbench then acts as a fixed-latency aligner (reset on odd
// (10 - p), slide otherwise) and checks that the time from a comma's first
// bit on the line to the recovered-clock edge that presents it at p = 0 is
// the same after every lock and lies within the model's pipeline: 10 word
// clocks (comma 3, FIFO 5, interface 2) plus a serial section of one to three
// word clocks.
`timescale 1ps/1ps
module gtp_rx_model_tb;
  logic clkin = 1'b0, rxp = 1'b0, reset, rxslide, rxrecclk, pll_lock, cdr_lock;
  logic [3:0] slide_q;
  logic [9:0] rxdata;
  int checks = 0, failures = 0;

  always #8000 clkin = ~clkin;

  gtp_rx_model dut (.clkin, .rxp, .reset, .rxslide, .rxusrclk2(rxrecclk), .rxrecclk,
                    .pll_lock, .cdr_lock, .slide_q, .rxdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Line driver: records the start time of every comma.
  longint comma_t [$];
  initial begin
    int w, f;
    logic [9:0] c;
    w = 0; f = 0;
    @(posedge clkin);
    #137;
    forever begin
      if (w == 0) begin
        c = (f % 2 == 0) ? 10'h17C : 10'h283;
        comma_t.push_back($time);
        if (comma_t.size() > 64) void'(comma_t.pop_front());
        f++;
      end else c = ($urandom % 2) ? 10'h155 : 10'h2AA;
      for (int b = 0; b < 10; b++) begin
        rxp = c[b];
        #400;
      end
      w = (w + 1) % 16;
    end
  end

  // Word monitor: comma offset of the latest comma, and its arrival time.
  logic [9:0] prev = '0;
  int   p_now = -1;
  longint t_p0 = 0;
  time  last_edge = 0;
  int   period_bad = 0, periods = 0, quiet = 0;
  always @(posedge rxrecclk) begin
    logic [19:0] win;
    win = {rxdata, prev};
    for (int p = 9; p >= 0; p--)
      if (win[p +: 7] == 7'b1111100 || win[p +: 7] == 7'b0000011) begin
        p_now = p;
        if (p == 0) t_p0 = $time;
      end
    prev = rxdata;
    // The period is checked away from slides and resets, where a phase
    // step or a relock is expected.
    if (!cdr_lock || reset || rxslide) quiet = 0;
    else if (quiet < 16) quiet++;
    else begin
      periods++;
      if ($time - last_edge != 4000) period_bad++;
    end
    last_edge = $time;
  end

  task automatic relock;
    @(posedge rxrecclk) reset = 1'b1;
    repeat (4) @(posedge rxrecclk);
    reset = 1'b0;
    wait (cdr_lock === 1'b1);
    repeat (80) @(posedge rxrecclk);
  endtask

  task automatic slide_once;
    @(posedge rxrecclk) rxslide = 1'b1;
    @(posedge rxrecclk) rxslide = 1'b0;
    repeat (40) @(posedge rxrecclk);
  endtask

  initial begin
    int p_seen [10];
    int p_a, distinct, n, aligned_runs;
    longint lat, lat0;
    reset = 1'b1; rxslide = 1'b0;
    foreach (p_seen[i]) p_seen[i] = 0;
    #200000 reset = 1'b0;
    wait (cdr_lock === 1'b1);
    repeat (80) @(posedge rxrecclk);
    // Slides move the comma offset one bit at a time.
    for (int i = 0; i < 12; i++) begin
      p_a = p_now;
      repeat (2) @(posedge rxrecclk);
      check(p_now == p_a, "offset steady");
      slide_once();
      check(p_now == (p_a + 1) % 10, $sformatf("slide moved p %0d -> %0d", p_a, p_now));
    end
    // Resets land on random offsets.
    for (int i = 0; i < 12; i++) begin
      relock();
      p_seen[p_now]++;
    end
    distinct = 0;
    foreach (p_seen[i]) if (p_seen[i] > 0) distinct++;
    check(distinct >= 3, $sformatf("%0d distinct offsets after resets", distinct));
    // Fixed-latency alignment by reset and slide.
    aligned_runs = 0; lat0 = -1;
    for (int tries = 0; tries < 60 && aligned_runs < 5; tries++) begin
      relock();
      n = (10 - p_now) % 10;
      if (n % 2 == 1) continue;
      repeat (n) slide_once();
      check(p_now == 0, $sformatf("aligned after %0d slides", n));
      // Latency: newest comma presented at p = 0 against its line time.
      repeat (40) @(posedge rxrecclk);
      lat = -1;
      foreach (comma_t[i]) begin
        longint d;
        d = longint'(t_p0) - comma_t[i];
        if (d > 40000 && d <= 52000) lat = d;
      end
      check(lat > 0, "comma latency within the pipeline");
      if (lat0 < 0) lat0 = lat;
      check(lat == lat0, $sformatf("latency %0d, first %0d", lat, lat0));
      $display("aligned lock %0d after %0d slides: latency %0d ps", aligned_runs, n, lat);
      aligned_runs++;
    end
    check(aligned_runs == 5, "five aligned locks");
    check(periods > 1000 && period_bad == 0,
          $sformatf("recovered clock period: %0d of %0d wrong", period_bad, periods));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
