// gbt_rs_enc_tb: checks the RS(15,11) encoder over GF(16) with arithmetic of
// its own (exponent and logarithm tables of x modulo x^4 + x + 1).
//
// Checks: for 2000 random messages the codeword {msg, par} evaluates to zero
// at a, a^2, a^3 and a^4; the message 1 (lowest-degree symbol only) gives
// the low coefficients of g(x) = (x + a)(x + a^2)(x + a^3)(x + a^4), worked
// out here from the tables; the all-zero message gives zero check symbols;
// and the code is linear (the check symbols of a sum are the sum of the
// check symbols).
`timescale 1ps/1ps
module gbt_rs_enc_tb;
  logic [43:0] msg;
  logic [15:0] par;
  int checks = 0, failures = 0;

  gbt_rs_enc dut (.msg, .par);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int exp_t [30];
  int log_t [16];
  function automatic int mul(input int a, input int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[(log_t[a] + log_t[b]) % 15];
  endfunction

  function automatic int syn(input logic [59:0] cw, input int j);
    int acc;
    acc = 0;
    for (int k = 14; k >= 0; k--) acc = mul(acc, exp_t[j]) ^ int'(cw[4*k +: 4]);
    return acc;
  endfunction

  initial begin
    int v;
    int g [5];
    logic [15:0] p1, p2;
    logic [43:0] m1, m2;
    v = 1;
    for (int i = 0; i < 30; i++) begin
      exp_t[i] = v;
      v = v << 1;
      if (v & 16) v = v ^ 'h13;
    end
    for (int i = 0; i < 15; i++) log_t[exp_t[i]] = i;
    log_t[0] = 0;
    // g(x) from its roots.
    g = '{1, 0, 0, 0, 0};
    for (int i = 1; i <= 4; i++) begin
      for (int k = 4; k >= 1; k--) g[k] = g[k-1] ^ mul(g[k], exp_t[i]);
      g[0] = mul(g[0], exp_t[i]);
    end
    check(g[4] == 1, "generator is monic");

    msg = '0; #1;
    check(par == 16'h0, "zero message");
    msg = 44'h1; #1;
    check(par == {4'(g[3]), 4'(g[2]), 4'(g[1]), 4'(g[0])}, $sformatf("x^4 mod g = %h", par));
    for (int i = 0; i < 2000; i++) begin
      msg = {12'($urandom), $urandom}; #1;
      for (int j = 1; j <= 4; j++)
        check(syn({msg, par}, j) == 0, $sformatf("syndrome %0d of %h %h", j, msg, par));
    end
    for (int i = 0; i < 200; i++) begin
      m1 = {12'($urandom), $urandom}; m2 = {12'($urandom), $urandom};
      msg = m1; #1 p1 = par;
      msg = m2; #1 p2 = par;
      msg = m1 ^ m2; #1;
      check(par == (p1 ^ p2), "linear");
    end
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
