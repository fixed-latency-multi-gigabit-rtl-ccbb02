// gtp_tx_model_tb: checks the transmit transceiver model: serial framing and
// the fixed latency brought by TXPHASE alignment.
//
// The reference clock is 62.5 MHz; the user clock comes from dll_model, four
// times the reference, as on the board. The driver sends 16-symbol frames of
// K28.5 and fifteen balanced data symbols (D21.5, D10.2, randomly), so every
// code word is known in advance (K28.5 0x17C/0x283, D21.5 0x155, D10.2
// 0x2AA, bit 0 first). An independent sampler reads the line in the middle of
// each 400 ps bit and rebuilds the words from every comma.
// Expected latency, from the TXUSRCLK2 edge t0 that takes in the comma to
// the start of its first bit on the line: the encoder output changes at
// t0+4 ns and the bypassed FIFO output at t0+8 ns; the bit clock's first
// edge after that lies 50 ps later (the PLL model's output delay), and the
// aligned PISO loads XCLK_OFFSET = 5 bits (2 ns) after it. LAT_PS = 10050 ps.
// Six power-ups with alignment must all give LAT_PS; six without alignment
// must give more than one value (the divider phase is random at each lock).
`timescale 1ps/1ps
module gtp_tx_model_tb;
  // Capture edge t0: encoder output t0+4000, FIFO output t0+8000; the PISO
  // loads 50 + 5*400 ps after the FIFO edge.
  localparam longint LAT_PS = 8000 + 50 + 5 * 400;

  logic clkin = 1'b0, pll_rst, refclkout, pll_lock, usrclk, clk1, dll_lock;
  logic [7:0] txdata;
  logic txcharisk, txphase, txp;
  int checks = 0, failures = 0;

  always #8000 clkin = ~clkin;

  dll_model u_dll (.clkin(refclkout), .rst(pll_rst), .clk_x1(clk1), .clk_x4(usrclk), .lock(dll_lock));
  gtp_tx_model dut (.clkin, .pll_rst, .refclkout, .pll_lock, .txusrclk(usrclk), .txusrclk2(usrclk),
                    .txdata, .txcharisk, .txphase, .txp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Driver: frames of K28.5 + 15 data symbols; records capture times and codes.
  longint    k_times [$];
  logic [9:0] exp_codes [$];
  logic      drive_on = 1'b0;
  logic      rd_minus = 1'b1;
  always @(posedge usrclk) begin
    int idx;
    idx = 0;
    if (drive_on) begin
      // Symbol driven now is captured at the next rising edge.
      #1;
      idx = int'(frame_pos);
      if (idx == 0) begin
        txcharisk = 1'b1; txdata = 8'hBC;
        k_times.push_back($time - 1 + 4000);
        exp_codes.push_back(rd_minus ? 10'h17C : 10'h283);
        rd_minus = !rd_minus;
      end else begin
        txcharisk = 1'b0;
        if ($urandom % 2) begin txdata = 8'hB5; exp_codes.push_back(10'h155); end
        else              begin txdata = 8'h4A; exp_codes.push_back(10'h2AA); end
      end
      frame_pos = (frame_pos + 1) % 16;
    end
  end
  int unsigned frame_pos = 0;

  // Sampler: mid-bit samples, 400 ps apart, locked to the reference clock.
  logic [9:0] win = '0;
  int   words_left = 0, bitcnt = 0;
  int   lat_count = 0;
  longint lat_seen [$];
  initial begin
    @(posedge clkin);
    #250;
    forever begin
      win = {txp, win[9:1]};
      if (drive_on) begin
        if (words_left > 0) begin
          bitcnt++;
          if (bitcnt == 10) begin
            logic [9:0] e;
            bitcnt = 0;
            e = exp_codes.pop_front();
            check(win == e, $sformatf("word %h, want %h", win, e));
            words_left--;
          end
        end else if ((win == 10'h17C || win == 10'h283) && k_times.size() > 0) begin
          longint t_first, t0;
          logic [9:0] e;
          t_first = $time - 9 * 400 - 200;
          t0 = k_times.pop_front();
          e = exp_codes.pop_front();
          check(win == e, $sformatf("comma %h, want %h", win, e));
          lat_seen.push_back(t_first - t0);
          words_left = 15; bitcnt = 0;
        end
      end
      #400;
    end
  end

  task automatic power_up(input bit align, output longint lat);
    drive_on = 1'b0;
    txphase = 1'b0;
    @(negedge clkin) pll_rst = 1'b1;
    #50000 pll_rst = 1'b0;
    wait (pll_lock === 1'b1 && dll_lock === 1'b1);
    repeat (20) @(posedge usrclk);
    if (align) begin
      txphase = 1'b1;
      repeat (100) @(posedge usrclk);
      txphase = 1'b0;
    end
    repeat (10) @(posedge usrclk);
    k_times.delete(); exp_codes.delete(); lat_seen.delete();
    frame_pos = 0; rd_minus = 1'b1; win = '0; words_left = 0;
    // The encoder restarts at negative disparity with the PLL lock, so the
    // first comma is 0x17C.
    drive_on = 1'b1;
    repeat (16 * 6) @(posedge usrclk);
    lat = lat_seen.size() > 0 ? lat_seen[lat_seen.size() - 1] : -1;
    check(lat_seen.size() >= 4, "commas seen on the line");
    foreach (lat_seen[i]) check(lat_seen[i] == lat, "latency steady within a power-up");
  endtask

  initial begin
    longint lat, first_free;
    bit free_differs;
    pll_rst = 1'b0; txphase = 1'b0; txdata = 8'hB5; txcharisk = 1'b0;
    for (int i = 0; i < 6; i++) begin
      power_up(1'b1, lat);
      $display("aligned power-up %0d: latency %0d ps", i, lat);
      check(lat == LAT_PS, $sformatf("aligned latency %0d, want %0d", lat, LAT_PS));
    end
    free_differs = 1'b0;
    for (int i = 0; i < 6; i++) begin
      power_up(1'b0, lat);
      $display("unaligned power-up %0d: latency %0d ps", i, lat);
      if (i == 0) first_free = lat;
      else if (lat != first_free) free_differs = 1'b1;
    end
    check(free_differs, "latency varies without phase alignment");
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
