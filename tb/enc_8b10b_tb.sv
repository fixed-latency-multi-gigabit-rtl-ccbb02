// enc_8b10b_tb: checks the 8b10b encoder against hand-worked code words and
// against the rules every 8b10b stream obeys.
//
// Fixed vectors (bit 0 = 'a'): K28.5 from RD- is 0x17C and from RD+ 0x283;
// D21.5 is 0x155 and D10.2 0x2AA from either disparity; D0.0 from RD- is
// 0x0B9. Then 4000 random symbols (data, and the twelve valid control
// characters) are encoded and checked for: 4..6 ones per word, a running
// disparity that stays at +-1, no run of more than five equal bits, the
// encoder's rd output, and a round trip through dec_8b10b. The encoder's
// latency of one clock is checked with the first vector.
`timescale 1ps/1ps
module enc_8b10b_tb;
  logic clk = 1'b0, rst, en;
  logic [7:0] data;
  logic is_k;
  logic [9:0] code;
  logic rd;
  logic [7:0] ddata;
  logic dk, derr;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  enc_8b10b dut (.clk, .rst, .en, .data, .is_k, .code, .rd);
  dec_8b10b u_dec (.clk, .rst, .en(1'b1), .code, .data(ddata), .is_k(dk), .code_err(derr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic k, input logic [7:0] d);
    is_k = k; data = d;
    @(posedge clk); #1;
  endtask

  logic [7:0] kcodes [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                               8'hF7, 8'hFB, 8'hFD, 8'hFE};

  initial begin
    int disp, run, last;
    logic [9:0] prev_code;
    logic       pk;
    logic [7:0] pd;
    rst = 1'b1; en = 1'b1; is_k = 1'b0; data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    send(1'b1, 8'hBC); check(code == 10'h17C && rd == 1'b1, $sformatf("K28.5 RD- %h", code));
    send(1'b1, 8'hBC); check(code == 10'h283 && rd == 1'b0, $sformatf("K28.5 RD+ %h", code));
    send(1'b0, 8'hB5); check(code == 10'h155 && rd == 1'b0, $sformatf("D21.5 %h", code));
    send(1'b0, 8'h4A); check(code == 10'h2AA, $sformatf("D10.2 %h", code));
    send(1'b0, 8'h00); check(code == 10'h0B9 && rd == 1'b0, $sformatf("D0.0 RD- %h", code));

    disp = -1; run = 0; last = -1;
    pk = 1'b0; pd = 8'h00;
    for (int i = 0; i < 4000; i++) begin
      logic k;
      logic [7:0] d;
      k = ($urandom % 8) == 0;
      d = k ? kcodes[$urandom % 12] : 8'($urandom);
      send(k, d);
      begin
        int ones;
        ones = $countones(code);
        check(ones >= 4 && ones <= 6, $sformatf("weight of %h", code));
        disp += 2 * (ones - 5);
        check(disp == -1 || disp == 1, $sformatf("running disparity %0d after %h", disp, code));
        check(rd == (disp == 1), "rd output");
        for (int b = 0; b < 10; b++) begin
          if (int'(code[b]) == last) run++;
          else begin run = 1; last = int'(code[b]); end
          if (run > 5) begin check(1'b0, $sformatf("run of %0d in %h", run, code)); run = 0; end
        end
      end
      // The decoder output now holds the symbol sent one clock earlier.
      if (i > 0) check(ddata == pd && dk == pk && !derr,
                       $sformatf("round trip %0d %h -> %0d %h", pk, pd, dk, ddata));
      pk = k; pd = d;
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
