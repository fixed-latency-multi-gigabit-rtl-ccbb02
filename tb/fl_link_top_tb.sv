// fl_link_top_tb: end-to-end test of the fixed-latency link at its default sizes.
//
// Two boards joined by a cable of CABLE_PS. The test brings the transmitter
// up, then repeatedly resets the receiver (every trial) and power-cycles the
// transmitter (every third trial). In each trial it waits for ALIGNED, sends a
// one-off marker byte by reprogramming pattern entry 1, and measures the time
// from the marker leaving the payload generator to the decoded marker at the
// receiver output. The link is fixed-latency if that time is identical in
// every trial; it is also compared with the value worked out by hand from the
// stage counts (3 transmit registers, load 5 bits into the word, 10 bits of
// serialization, the cable, capture at the last bit's sample point, then
// 10 receive register stages and the decoder: 61850 ps + cable).
// It also checks one full pattern period of decoded data against the
// pattern, and counts the mechanisms the design relies on: transmit phase
// alignment runs, odd-slip lock rejections, RXSLIDE pulses, alignments.
`timescale 1ps/1ps
module fl_link_top_tb;
  import fl_link_pkg::*;

  localparam int unsigned CABLE_PS  = 1230;
  localparam int unsigned TRIALS    = 9;
  localparam longint      EXPECT_PS = 61850 + CABLE_PS + 5;
  localparam logic [7:0]  MARK      = 8'hA5;
  localparam longint      TOL_PS    = 10;

  logic tx_refclk = 1'b0, rx_seedclk = 1'b0;
  logic tx_pll_rst, tx_rst, rx_rst;
  logic pat_wr_en;
  logic [3:0] pat_wr_addr;
  sym_t pat_wr_sym;
  logic tx_refclkout, tx_usrclk, tx_ready, tx_phase, tx_frame_start, tx_payload_bit, txp;
  sym_t tx_sym, rx_sym;
  logic rxp, rx_recclk, rx_code_err, rx_aligned, rx_reject, rx_slide;
  logic [3:0] rx_last_n;
  logic gbt_clk = 1'b0, gbt_rst, gbt_valid;
  logic [3:0] gbt_sc;
  logic [15:0] gbt_ttc;
  logic [63:0] gbt_d;
  logic [119:0] gbt_frame;
  int n_gbt_frames = 0, n_gbt_corrected = 0, n_elink_frames = 0;
  logic gbt_clk80 = 1'b0, gbt_frame_stb = 1'b0;
  logic [31:0] gbt_elink_dout, gbt_elink_din;
  logic [63:0] gbt_elink_d_in;
  logic [119:0] gbt_rx_frame;
  logic [3:0] gbt_rx_sc;
  logic [15:0] gbt_rx_ttc;
  logic [63:0] gbt_rx_d;
  logic gbt_rx_header_ok, gbt_rx_corrected, gbt_rx_uncorrectable;

  int checks = 0, failures = 0;
  int n_phase_align = 0, n_reject = 0, n_slide = 0, n_aligned = 0;

  always #8000 tx_refclk = ~tx_refclk;
  initial begin
    #3100;
    forever #8000 rx_seedclk = ~rx_seedclk;
  end

  // Cable: a delay line sampled every STEP_PS, 5 ps after the transmitter's
  // bit edges, so that every bit gets through; the delay is CABLE_PS + 5 ps.
  localparam int unsigned STEP_PS = 10;
  localparam int unsigned TAPS    = CABLE_PS / STEP_PS + 1;
  logic [TAPS-1:0] line;
  initial begin
    line = '0;
    #5;
    forever begin
      line = {line[TAPS-2:0], txp};
      #(STEP_PS);
    end
  end
  assign rxp = line[TAPS-1];

  fl_link_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // GBT frames: random fields every 25 ns; the frame one clock later must
  // carry the header and the fields in place. The frame is looped back to
  // the receiver with one 4-bit symbol flipped, and the receiver must return
  // the fields sent, flagged as corrected, one clock after that.
  always #12500 gbt_clk = ~gbt_clk;
  initial begin
    logic [3:0] s; logic [15:0] tt; logic [63:0] dd;
    int pos;
    gbt_rst = 1'b1; gbt_valid = 1'b0; gbt_sc = '0; gbt_ttc = '0; gbt_d = '0; gbt_rx_frame = '0;
    repeat (2) @(posedge gbt_clk);
    #1 gbt_rst = 1'b0;
    repeat (100) begin
      @(negedge gbt_clk);
      s = 4'($urandom); tt = 16'($urandom); dd = {$urandom, $urandom};
      gbt_valid = 1'b1; gbt_sc = s; gbt_ttc = tt; gbt_d = dd;
      @(posedge gbt_clk); #1;
      check(gbt_frame[119:32] == {4'b0101, s, tt, dd}, "GBT frame fields");
      n_gbt_frames++;
      gbt_rx_frame = gbt_frame;
      pos = int'($urandom % 30);
      gbt_rx_frame[4 * pos +: 4] = gbt_rx_frame[4 * pos +: 4] ^ 4'(1 + $urandom % 15);
      @(posedge gbt_clk); #1;
      check({gbt_rx_sc, gbt_rx_ttc, gbt_rx_d} == {s, tt, dd} && gbt_rx_header_ok, "GBT frame received");
      check(gbt_rx_corrected && !gbt_rx_uncorrectable, "GBT symbol error corrected");
      if (gbt_rx_corrected) n_gbt_corrected++;
    end
    gbt_valid = 1'b0;
  end

  // E-links: an 80 MHz clock with its edges between those of the 40 MHz
  // frame clock, a strobe on every second edge, the lines looped back. The
  // word on d_in must be the data field taken in one frame earlier.
  assign gbt_elink_din = gbt_elink_dout;
  initial begin
    #3125;
    forever #6250 gbt_clk80 = ~gbt_clk80;
  end
  initial begin
    logic [63:0] sent;
    logic have;
    have = 1'b0;
    forever begin
      @(negedge gbt_clk80) gbt_frame_stb = 1'b1;
      @(posedge gbt_clk80) begin
        if (have && !gbt_rst) begin
          #1 check(gbt_elink_d_in == sent, "e-link word looped back");
          n_elink_frames++;
        end
        sent = gbt_rx_d;
        have = !gbt_rst;
      end
      @(negedge gbt_clk80) gbt_frame_stb = 1'b0;
      @(posedge gbt_clk80);
    end
  end

  // Mechanism counters.
  always @(posedge tx_phase) n_phase_align++;
  always @(posedge rx_aligned) n_aligned++;
  always @(posedge rx_recclk) begin
    if (rx_reject) n_reject++;
    if (rx_slide)  n_slide++;
  end

  // Marker timestamps.
  longint t_tx = 0, t_rx = 0;
  always @(posedge tx_usrclk) begin
    #1;
    if (!tx_sym.is_k && tx_sym.data == MARK) t_tx = $time - 1;
  end
  always @(posedge rx_recclk) begin
    #1;
    if (rx_aligned && !rx_sym.is_k && rx_sym.data == MARK) t_rx = $time - 1;
  end

  task automatic write_pat(input int addr, input sym_t s);
    @(posedge tx_usrclk);
    #1;
    pat_wr_en = 1'b1; pat_wr_addr = 4'(addr); pat_wr_sym = s;
    @(posedge tx_usrclk);
    #1;
    pat_wr_en = 1'b0;
  endtask

  task automatic wait_cycles_rx(input int n);
    repeat (n) @(posedge rx_recclk);
  endtask

  longint lat0 = -1;

  initial begin
    pat_wr_en = 1'b0; pat_wr_addr = '0; pat_wr_sym = '0;
    tx_pll_rst = 1'b1; tx_rst = 1'b1; rx_rst = 1'b1;
    #100000;
    tx_pll_rst = 1'b0;
    repeat (20) @(posedge tx_refclk);
    @(posedge tx_usrclk); #1 tx_rst = 1'b0;

    for (int trial = 0; trial < TRIALS; trial++) begin
      if (trial % 3 == 2) begin
        // Transmitter power cycle: the word clock comes back at a new phase.
        tx_pll_rst = 1'b1;
        #50000;
        tx_pll_rst = 1'b0;
        // The user clock stops while the DLL is in reset, so tx_ready only
        // falls once it runs again.
        wait (tx_ready === 1'b0);
      end
      wait (tx_ready === 1'b1);
      // Receiver reset: the CDR relocks at a new phase.
      @(posedge rx_recclk); #1 rx_rst = 1'b1;
      wait_cycles_rx(8);
      #1 rx_rst = 1'b0;
      wait (rx_aligned === 1'b1);
      wait_cycles_rx(40);
      check(rx_aligned === 1'b1, "aligned stays up");

      // One pattern period of decoded data must follow the pattern.
      begin
        int k_at;
        k_at = -1;
        for (int i = 0; i < 32; i++) begin
          @(posedge rx_recclk); #1;
          if (rx_sym.is_k && rx_sym.data == K28_5) k_at = i;
          else if (k_at >= 0 && i - k_at < 16) begin
            check(!rx_sym.is_k && rx_sym.data == 8'(i - k_at) && !rx_code_err,
                  $sformatf("trial %0d data %0d after comma is %h", trial, i - k_at, rx_sym.data));
          end
        end
        check(k_at >= 0, "comma seen at the receiver");
      end

      // Latency of a one-off marker.
      t_tx = 0; t_rx = 0;
      write_pat(1, sym_t'{is_k: 1'b0, data: MARK});
      repeat (17) @(posedge tx_usrclk);
      write_pat(1, sym_t'{is_k: 1'b0, data: 8'd1});
      repeat (40) @(posedge tx_usrclk);
      check(t_tx != 0 && t_rx > t_tx, $sformatf("trial %0d marker seen", trial));
      $display("trial %0d: n=%0d latency %0d ps (%0.2f cycles)", trial, rx_last_n,
               t_rx - t_tx, real'(t_rx - t_tx) / 4000.0);
      if (lat0 < 0) lat0 = t_rx - t_tx;
      // The cable model moves the line in 10 ps steps, so edges seen by the
      // receiver can be off by up to one step; the tolerance covers that.
      check(t_rx - t_tx <= lat0 + TOL_PS && t_rx - t_tx + TOL_PS >= lat0, $sformatf("trial %0d latency %0d differs from %0d", trial, t_rx - t_tx, lat0));
      check(t_rx - t_tx <= EXPECT_PS + TOL_PS && t_rx - t_tx + TOL_PS >= EXPECT_PS, $sformatf("trial %0d latency %0d, expected %0d", trial, t_rx - t_tx, EXPECT_PS));
    end

    $display("mechanisms: phase_align=%0d reject=%0d slide=%0d aligned=%0d",
             n_phase_align, n_reject, n_slide, n_aligned);
    check(n_gbt_frames == 100, "GBT frames built");
    check(n_gbt_corrected > 0, "GBT frame errors corrected");
    check(n_elink_frames > 0, "e-link frames looped back");
    check(n_phase_align >= 2, "transmit phase alignment ran after power-up and a power cycle");
    check(n_reject >= 1, "an odd slip count was rejected");
    check(n_slide >= 1, "RXSLIDE was used");
    check(n_aligned >= int'(TRIALS), "receiver aligned in every trial");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
