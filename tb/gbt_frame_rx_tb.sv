// gbt_frame_rx_tb: checks frame unpacking and Reed-Solomon correction by a
// loop through gbt_frame_tx. For each of 1500 random frames the testbench
// corrupts, with equal chance, nothing; one random symbol of each codeword;
// two random symbols of each codeword; or a burst of 13 adjacent bits
// anywhere in the frame (it touches at most four adjacent symbols, so at
// most two per codeword).
// In every case the fields one clock later must equal those sent, with
// header_ok high, corrected high exactly when something was corrupted, and
// uncorrectable low. Three wrong symbols in one codeword are beyond the code:
// such frames are sent too and must not be reported as clean.
`timescale 1ps/1ps
module gbt_frame_rx_tb;
  logic clk = 1'b0, rst;
  logic [3:0] sc_i, sc_o;
  logic [15:0] ttc_i, ttc_o;
  logic [63:0] d_i, d_o;
  logic [119:0] frame_tx, frame_rx;
  logic header_ok, corrected, uncorrectable;
  int checks = 0, failures = 0;

  always #12500 clk = ~clk;

  gbt_frame_tx u_tx (.clk, .rst, .valid(1'b1), .sc(sc_i), .ttc(ttc_i), .d(d_i), .frame(frame_tx));
  gbt_frame_rx dut (.clk, .rst, .valid(1'b1), .frame(frame_rx), .sc(sc_o), .ttc(ttc_o), .d(d_o),
                    .header_ok, .corrected, .uncorrectable);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Symbol index (0 = bits 119:116 ... 29 = bits 3:0) of codeword c, n-th symbol.
  function automatic int sym_of(input int c, input int n);
    return (n < 11) ? 2 * n + c : 22 + 2 * (n - 11) + c;
  endfunction

  initial begin
    logic [3:0] s; logic [15:0] t; logic [63:0] dd;
    logic [119:0] f;
    int mode, a, b;
    rst = 1'b1; sc_i = '0; ttc_i = '0; d_i = '0; frame_rx = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 1500; i++) begin
      s = 4'($urandom); t = 16'($urandom); dd = {$urandom, $urandom};
      @(negedge clk); sc_i = s; ttc_i = t; d_i = dd;
      @(posedge clk); #1;
      f = frame_tx;
      mode = int'($urandom % 5);
      case (mode)
        1: for (int c = 0; c < 2; c++) begin
             a = sym_of(c, int'($urandom % 15));
             f[119 - 4*a -: 4] ^= 4'(1 + $urandom % 15);
           end
        2: for (int c = 0; c < 2; c++) begin
             a = int'($urandom % 15);
             b = (a + 1 + int'($urandom % 14)) % 15;
             f[119 - 4*sym_of(c, a) -: 4] ^= 4'(1 + $urandom % 15);
             f[119 - 4*sym_of(c, b) -: 4] ^= 4'(1 + $urandom % 15);
           end
        3: begin
             a = int'($urandom % 108);
             f[a +: 13] = f[a +: 13] ^ {1'b1, 11'($urandom), 1'b1};
           end
        4: begin
             a = int'($urandom % 13);
             for (int n = 0; n < 3; n++)
               f[119 - 4*sym_of(0, a + n) -: 4] ^= 4'(1 + $urandom % 15);
           end
        default: ;
      endcase
      frame_rx = f;
      @(posedge clk); #1;
      if (mode == 4) begin
        check(corrected || uncorrectable || !header_ok || {sc_o, ttc_o, d_o} != {s, t, dd},
              "three errors not reported as a clean frame");
      end else begin
        check({sc_o, ttc_o, d_o} == {s, t, dd}, $sformatf("mode %0d fields", mode));
        check(header_ok, "header");
        check(corrected == (mode != 0) && !uncorrectable, $sformatf("mode %0d flags %0d %0d", mode, corrected, uncorrectable));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
