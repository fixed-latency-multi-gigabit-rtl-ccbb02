// payload_gen_tb: checks the test-pattern source. After reset the block must
// play K28.5 followed by data 1..15, one symbol per clock (the link's
// 250 Mword/s user rate), with frame_start on the comma and payload_bit equal
// to data bit 0. A pause of en must hold the output, and an entry written
// through the programming port must appear in place of the reset contents on
// the following pass and from then on.
`timescale 1ps/1ps
module payload_gen_tb;
  import fl_link_pkg::*;
  localparam int unsigned L = 16;
  logic clk = 1'b0, rst, en, wr_en;
  logic [3:0] wr_addr;
  sym_t wr_sym, tx_sym;
  logic frame_start, payload_bit;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  payload_gen dut (.clk, .rst, .en, .wr_en, .wr_addr, .wr_sym, .tx_sym, .frame_start, .payload_bit);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  sym_t model [L];

  task automatic expect_pass(input int start);
    for (int i = 0; i < int'(L); i++) begin
      int a;
      a = (start + i) % int'(L);
      @(posedge clk); #1;
      check(tx_sym == model[a], $sformatf("entry %0d: %h want %h", a, tx_sym, model[a]));
      check(frame_start == (a == 0), "frame_start");
      check(payload_bit == model[a].data[0], "payload_bit");
    end
  endtask

  initial begin
    for (int i = 0; i < int'(L); i++) model[i] = (i == 0) ? sym_t'{1'b1, 8'hBC} : sym_t'{1'b0, 8'(i)};
    rst = 1'b1; en = 1'b0; wr_en = 1'b0; wr_addr = '0; wr_sym = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0; en = 1'b1;
    expect_pass(0);
    expect_pass(0);
    // Pause: output holds.
    #0 en = 1'b0;
    begin
      sym_t held;
      held = tx_sym;
      repeat (5) begin @(posedge clk); #1; check(tx_sym == held, "hold while en low"); end
    end
    en = 1'b1;
    expect_pass(0);
    // Reprogram two entries while running.
    wr_en = 1'b1; wr_addr = 4'd3; wr_sym = sym_t'{1'b0, 8'hA5}; model[3] = wr_sym;
    @(posedge clk); #1;
    wr_addr = 4'd9; wr_sym = sym_t'{1'b1, 8'h3C}; model[9] = wr_sym;
    @(posedge clk); #1;
    wr_en = 1'b0;
    // Resynchronise to the frame, then check two passes.
    while (!frame_start) begin @(posedge clk); #1; end
    expect_pass(1);
    expect_pass(1);
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
