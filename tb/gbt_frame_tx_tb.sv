// gbt_frame_tx_tb: checks the GBT frame builder and its Reed-Solomon check
// symbols with arithmetic of its own.
//
// The testbench builds GF(16) from exponent and logarithm tables (powers of
// x modulo x^4 + x + 1), which is a different route from the shift-and-add
// product used by the design. For random SC, TTC and D it checks, one
// 40 MHz clock (25 ns) after the inputs: the field positions (H, SC, TTC, D
// from bit 119 down, FEC in bits 31:0), the header value, and that both
// de-interleaved 15-symbol codewords evaluate to zero at a, a^2, a^3, a^4
// (all four syndromes zero). It also checks that changing any one data
// symbol makes some syndrome nonzero, and that an all-zero payload has an
// FEC field that is the code of the header alone (nonzero).
`timescale 1ps/1ps
module gbt_frame_tx_tb;
  logic clk = 1'b0, rst, valid;
  logic [3:0] sc;
  logic [15:0] ttc;
  logic [63:0] d;
  logic [119:0] frame;
  int checks = 0, failures = 0;

  always #12500 clk = ~clk;

  gbt_frame_tx dut (.clk, .rst, .valid, .sc, .ttc, .d, .frame);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int exp_t [30];
  int log_t [16];
  function automatic int mul(input int a, input int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[(log_t[a] + log_t[b]) % 15];
  endfunction

  // Codeword c (0 or 1) of a frame, c_14 (first) .. c_0, evaluated at a^j.
  function automatic int syndrome(input logic [119:0] f, input int c, input int j);
    int acc, sym;
    acc = 0;
    for (int k = 0; k < 15; k++) begin
      // Symbols of codeword c in sending order: info symbols c, c+2, .., then
      // FEC symbols c, c+2, ...
      if (k < 11) sym = int'(f[119 - 4*(2*k + c) -: 4]);
      else        sym = int'(f[31 - 4*(2*(k - 11) + c) -: 4]);
      acc = mul(acc, exp_t[j]) ^ sym;     // Horner, highest degree first
    end
    return acc;
  endfunction

  task automatic send_and_check(input logic [3:0] s, input logic [15:0] t, input logic [63:0] dd,
                                output logic [119:0] f);
    @(negedge clk);
    valid = 1'b1; sc = s; ttc = t; d = dd;
    @(posedge clk); #1;
    f = frame;
    check(frame[119:116] == 4'b0101, "header");
    check(frame[115:112] == s && frame[111:96] == t && frame[95:32] == dd, "field positions");
    for (int c = 0; c < 2; c++)
      for (int j = 1; j <= 4; j++)
        check(syndrome(frame, c, j) == 0, $sformatf("codeword %0d syndrome %0d", c, j));
  endtask

  initial begin
    logic [119:0] f;
    int v;
    v = 1;
    for (int i = 0; i < 30; i++) begin
      exp_t[i] = v;
      v = v << 1;
      if (v & 16) v = v ^ 'h13;
    end
    for (int i = 0; i < 15; i++) log_t[exp_t[i]] = i;
    log_t[0] = 0;

    rst = 1'b1; valid = 1'b0; sc = '0; ttc = '0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    send_and_check(4'h0, 16'h0, 64'h0, f);
    check(f[31:0] != 32'h0, "header alone has check symbols");
    for (int i = 0; i < 200; i++) begin
      send_and_check(4'($urandom), 16'($urandom), {$urandom, $urandom}, f);
      // A single wrong symbol must show in the syndromes.
      begin
        int pos;
        logic [119:0] g;
        pos = 4 + int'($urandom % 26);
        g = f;
        g[4*pos +: 4] = g[4*pos +: 4] ^ 4'(1 + $urandom % 15);
        check((syndrome(g, 0, 1) | syndrome(g, 0, 2) | syndrome(g, 1, 1) | syndrome(g, 1, 2)) != 0,
              "corrupted symbol detected");
      end
    end
    // Hold: with valid low the frame keeps its value.
    @(negedge clk) valid = 1'b0; d = ~d;
    @(posedge clk); #1;
    check(frame == f, "frame held while valid is low");
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
