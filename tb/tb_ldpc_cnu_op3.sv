// Testbench of ldpc_cnu_op3: hand-computed codes, then random inputs compared with the Radix-4
// formula evaluated in real arithmetic (largest plus exact correction from the second largest
// of alpha and beta) within 3/16, and with the exact three-input check update within 0.8.
module tb_ldpc_cnu_op3;
  logic signed [7:0] a, b, c, y;
  int checks = 0, failures = 0;

  ldpc_cnu_op3 #(.W(8)) u_dut (.a, .b, .c, .y);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real lse2(input real v0, input real v1, input real v2, input real v3);
    real s[4];
    real m1, m2;
    int im;
    s[0] = v0; s[1] = v1; s[2] = v2; s[3] = v3;
    im = 0;
    for (int i = 1; i < 4; i++) if (s[i] > s[im]) im = i;
    m1 = s[im];
    m2 = -1.0e9;
    for (int i = 0; i < 4; i++) if (i != im && s[i] > m2) m2 = s[i];
    return m1 + $ln(1.0 + $exp(-(m1 - m2)));
  endfunction

  function automatic real atanh(input real v);
    return 0.5 * $ln((1.0 + v) / (1.0 - v));
  endfunction

  task automatic apply(input int ia, input int ib, input int ic);
    real ra, rb, rc, got, r1, r2;
    a = 8'(ia); b = 8'(ib); c = 8'(ic);
    #1;
    ra = real'(ia) / 16.0; rb = real'(ib) / 16.0; rc = real'(ic) / 16.0; got = real'(y) / 16.0;
    r1 = lse2(ra + rb + rc, ra, rb, rc) - lse2(ra + rb, rb + rc, ra + rc, 0.0);
    if (r1 > 127.0/16.0) r1 = 127.0/16.0;
    if (r1 < -8.0) r1 = -8.0;
    check(got - r1 <= 0.1875 && r1 - got <= 0.1875,
          $sformatf("a=%0d b=%0d c=%0d y=%0d ref %f", ia, ib, ic, y, r1));
    r2 = 2.0 * atanh($tanh(ra / 2.0) * $tanh(rb / 2.0) * $tanh(rc / 2.0));
    check(got - r2 <= 0.8 && r2 - got <= 0.8,
          $sformatf("a=%0d b=%0d c=%0d y=%0d exact %f", ia, ib, ic, y, r2));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // (1,1,1): alpha max 48, second 16, f(2.0)=2; beta max 32, second 32, f(0)=11 -> 7
    a = 8'sd16; b = 8'sd16; c = 8'sd16; #1 check(y == 8'sd7, $sformatf("op3(1,1,1)=%0d, expected 7", y));
    a = -8'sd16; #1 check(y == -8'sd7, $sformatf("op3(-1,1,1)=%0d, expected -7", y));
    // (4,4,4): alpha 192 vs 64 -> +0; beta 128 vs 128 -> 11: 192-128-11 = 53
    a = 8'sd64; b = 8'sd64; c = 8'sd64; #1 check(y == 8'sd53, $sformatf("op3(4,4,4)=%0d, expected 53", y));
    for (int i = 0; i < 4000; i++) apply($signed(8'($urandom)), $signed(8'($urandom)), $signed(8'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
