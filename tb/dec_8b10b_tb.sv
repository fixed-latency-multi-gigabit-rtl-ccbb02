// dec_8b10b_tb: checks the fabric 8b10b decoder on hand-worked code words,
// on an invalid word, and on every data byte and control character in both
// disparities, produced by enc_8b10b. The decoder's one-clock latency is
// checked with each vector.
`timescale 1ps/1ps
module dec_8b10b_tb;
  logic clk = 1'b0, rst;
  logic [9:0] code, ecode;
  logic [7:0] data, edata;
  logic is_k, code_err, ek, erd;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  dec_8b10b dut (.clk, .rst, .en(1'b1), .code, .data, .is_k, .code_err);
  enc_8b10b u_enc (.clk, .rst, .en(1'b1), .data(edata), .is_k(ek), .code(ecode), .rd(erd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic use_enc = 1'b0;
  logic [9:0] vec;
  assign code = use_enc ? ecode : vec;

  task automatic vector(input logic [9:0] c, input logic k, input logic [7:0] d, input logic err);
    vec = c;
    @(posedge clk); #1;
    if (err) check(code_err, $sformatf("%h flagged", c));
    else     check(!code_err && is_k == k && data == d,
                   $sformatf("%h -> k=%0d %h err=%0d, want k=%0d %h", c, is_k, data, code_err, k, d));
  endtask

  logic [7:0] kcodes [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                               8'hF7, 8'hFB, 8'hFD, 8'hFE};

  initial begin
    logic [7:0] pd;
    logic pk;
    rst = 1'b1; edata = '0; ek = 1'b0; vec = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    vector(10'h17C, 1'b1, 8'hBC, 1'b0);
    vector(10'h283, 1'b1, 8'hBC, 1'b0);
    vector(10'h155, 1'b0, 8'hB5, 1'b0);
    vector(10'h2AA, 1'b0, 8'h4A, 1'b0);
    vector(10'h0B9, 1'b0, 8'h00, 1'b0);
    vector(10'h000, 1'b0, 8'h00, 1'b1);
    vector(10'h3FF, 1'b0, 8'h00, 1'b1);

    // Every data byte and control character, twice so both disparities occur.
    use_enc = 1'b1;
    pk = 1'b0; pd = '0;
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 256 + 12; i++) begin
        ek    = (i >= 256);
        edata = ek ? kcodes[i - 256] : 8'(i);
        @(posedge clk); #1;           // encoder registers the symbol
        @(posedge clk); #1;           // decoder registers it
        check(!code_err && is_k == ek && data == edata,
              $sformatf("round trip k=%0d %h -> k=%0d %h", ek, edata, is_k, data));
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
