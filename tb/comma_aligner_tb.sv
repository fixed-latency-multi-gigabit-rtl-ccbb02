// comma_aligner_tb: runs the fabric comma aligner against a bit-level model
// of a receiver whose word boundary lands at a random offset on every lock.
//
// The stream is a repeating 8-symbol frame: K28.5 (alternating disparity)
// followed by D21.5 and D10.2, which are balanced and contain no comma. The
// receiver model presents word k as stream bits 10k-s .. 10k-s+9 (bit 0 first
// in time), where s is the word-boundary offset. While gtp_reset is high it
// outputs noise; when it drops a new random offset s0 is drawn. Each RXSLIDE
// pulse adds one to s, two clocks after the pulse, as a transceiver with a
// short internal pipeline would. Expected behaviour, worked out from the
// offsets alone: the symbols start p = s0 mod 10 bits into each word, the
// slide count is n = (10 - p) mod 10; an odd n must end in a reset without any
// slide, an even n in exactly n slides 33 clocks apart and ALIGNED with
// s mod 10 = 0. ALIGNED must then hold with no further slides. Finally the
// boundary is moved while aligned and the block must drop ALIGNED and reset.
`timescale 1ps/1ps
module comma_aligner_tb;
  logic clk = 1'b0, rst;
  logic [9:0] rxdata;
  logic rxslide, gtp_reset, aligned, reject, slide;
  logic [3:0] last_n;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  comma_aligner dut (.clk, .rst, .rxdata, .rxslide, .gtp_reset, .aligned,
                     .reject, .slide, .last_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [9:0] sym(input int idx);
    int f, w;
    f = idx / 8; w = idx % 8;
    if (w == 0) return (f % 2 == 0) ? 10'h17C : 10'h283;
    return (w % 2 == 1) ? 10'h155 : 10'h2AA;
  endfunction

  function automatic logic stream_bit(input int i);
    logic [9:0] c;
    c = sym(i / 10);
    return c[i % 10];
  endfunction

  // Receiver model.
  int   s, s0, k, slides_this;
  logic in_reset;
  logic [2:0] rs_pipe;

  initial begin
    s = 0; s0 = 0; k = 100; in_reset = 1'b1; rs_pipe = '0; slides_this = 0;
    rxdata = '0;
    forever begin
      @(posedge clk); #1;
      if (gtp_reset) in_reset = 1'b1;
      else if (in_reset) begin
        in_reset = 1'b0;
        s = int'($urandom % 10); s0 = s; slides_this = 0;
      end
      rs_pipe = {rs_pipe[1:0], rxslide};
      if (rs_pipe[2]) s++;
      if (in_reset) rxdata = 10'($urandom);
      else for (int j = 0; j < 10; j++) rxdata[j] = stream_bit(10 * k - s + j);
      k++;
    end
  end

  // Checks on the aligner's decisions.
  int n_reject = 0, n_slid = 0, n_zero = 0, n_aligned = 0;
  time last_slide_t;
  logic aligned_d = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      if (reject) begin
        n_reject++;
        check(slides_this == 0, "reject after slides");
        check(((10 - s0 % 10) % 10) % 2 == 1, $sformatf("reject with s0=%0d", s0));
        check(int'(last_n) == (10 - s0 % 10) % 10, $sformatf("last_n=%0d s0=%0d", last_n, s0));
      end
      if (slide) begin
        if (slides_this > 0)
          check($time - last_slide_t == 33 * 4000, "slide spacing");
        slides_this++;
        last_slide_t = $time;
      end
      if (aligned && !aligned_d) begin
        n_aligned++;
        if (slides_this == 0) n_zero++; else n_slid++;
        check(s % 10 == 0, $sformatf("aligned with s=%0d (s0=%0d)", s, s0));
        check(slides_this == (10 - s0 % 10) % 10, $sformatf("%0d slides for s0=%0d", slides_this, s0));
      end
      aligned_d <= aligned;
    end
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    while (n_aligned < 25) begin
      @(posedge clk);
      if (aligned && !aligned_d) begin
        // Stay aligned for a while with no slide and no reset.
        repeat (200) begin
          @(posedge clk);
          if (rxslide || gtp_reset || !aligned) begin check(1'b0, "aligned state disturbed"); break; end
        end
        checks++;
        // Force a relock by resetting the aligner.
        @(posedge clk); #1 rst = 1'b1;
        @(posedge clk); #1 rst = 1'b0;
      end
    end
    // Loss of word boundary while aligned.
    wait (aligned === 1'b1);
    repeat (20) @(posedge clk);
    #1 s += 3;
    repeat (12) @(posedge clk);     // a comma arrives every 8 words
    check(!aligned, "aligned dropped after boundary moved");
    wait (aligned === 1'b1);
    check(s % 10 == 0, "realigned after boundary moved");
    check(n_reject > 0, "an odd offset was rejected");
    check(n_slid > 0, "an even offset was slid");
    check(n_zero > 0, "a zero offset was accepted directly");
    $display("locks=%0d rejects=%0d slid=%0d zero=%0d", n_aligned, n_reject, n_slid, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
