// Testbench of ldpc_cnu. Random messages and degree selects are streamed in back to back; each
// output (one cycle later) is compared with
//  * an integer model written here: for edge e the other inputs in increasing order, the first
//    three and the next three combined by Radix-4 operations, then the seventh other input
//    (degree 8) or nothing (degree 7) combined in a last operation, all with the piece-wise
//    linear correction table; values must agree exactly;
//  * the exact extrinsic check update: the sign must agree wherever its magnitude exceeds 1.5.
// It also checks the one-cycle latency of out_valid.
module tb_ldpc_cnu;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, deg8 = 1'b0, out_valid;
  logic signed [7:0] q [8];
  logic signed [7:0] r [8];
  int checks = 0, failures = 0;

  ldpc_cnu #(.W(8)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int lut(input int x);
    if (x < 8) return 11 - x / 2;
    if (x < 24) return 9 - x / 4;
    if (x < 32) return 6 - x / 8;
    if (x < 48) return 4 - x / 16;
    if (x < 72) return 2 - x / 32;
    return 0;
  endfunction
  function automatic int clip(input int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction
  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction
  function automatic int m_op2(input int a, input int b);
    int m;
    m = (iabs(a) < iabs(b)) ? iabs(a) : iabs(b);
    if ((a < 0) != (b < 0)) m = -m;
    return clip(m + lut(iabs(a + b)) - lut(iabs(a - b)));
  endfunction
  function automatic int lse(input int v0, input int v1, input int v2, input int v3);
    int s[4];
    int m1, m2, d, im;
    s[0] = v0; s[1] = v1; s[2] = v2; s[3] = v3;
    im = 0;
    for (int i = 1; i < 4; i++) if (s[i] > s[im]) im = i;
    m1 = s[im];
    m2 = -100000;
    for (int i = 0; i < 4; i++) if (i != im && s[i] > m2) m2 = s[i];
    d = m1 - m2;
    return m1 + lut(d > 511 ? 511 : d);
  endfunction
  function automatic int m_op3(input int a, input int b, input int c);
    return clip(lse(a + b + c, a, b, c) - lse(a + b, b + c, a + c, 0));
  endfunction

  typedef struct { int v[8]; bit d8; } vec_t;
  vec_t pend[$];

  task automatic check_out(input vec_t t);
    for (int e = 0; e < (t.d8 ? 8 : 7); e++) begin
      int o[$];
      int x, y, m;
      real prod, ex;
      o.delete();
      for (int k = 0; k < (t.d8 ? 8 : 7); k++) if (k != e) o.push_back(t.v[k]);
      x = m_op3(o[0], o[1], o[2]);
      y = m_op3(o[3], o[4], o[5]);
      m = t.d8 ? m_op3(x, y, o[6]) : m_op2(x, y);
      check(int'(r[e]) == m, $sformatf("deg%0d edge %0d: got %0d model %0d", t.d8 ? 8 : 7, e, r[e], m));
      prod = 1.0;
      foreach (o[k]) prod *= $tanh(real'(o[k]) / 32.0);
      ex = $ln((1.0 + prod) / (1.0 - prod));
      if (ex > 1.5 || ex < -1.5) check((r[e] < 0) == (ex < 0.0), $sformatf("sign of edge %0d vs exact %f", e, ex));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      vec_t t;
      @(negedge clk);
      t.d8 = 1'($urandom);
      for (int k = 0; k < 8; k++) begin
        // mostly moderate values, sometimes extremes
        t.v[k] = ($urandom % 8 == 0) ? ((($urandom % 2) == 0) ? 127 : -128) : int'($urandom % 161) - 80;
        q[k] = 8'(t.v[k]);
      end
      deg8 = t.d8;
      in_valid = (n % 5 != 4);
      if (in_valid) pend.push_back(t);
      @(posedge clk);
      #1;
      check(out_valid == in_valid, "out_valid one cycle after in_valid");
      if (out_valid) check_out(pend.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
