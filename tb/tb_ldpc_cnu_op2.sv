// Testbench of ldpc_cnu_op2: hand-computed codes, then random and corner inputs compared with
// the two-input check update evaluated in real arithmetic (sign * min plus the two exact
// correction terms) within 3/16, and with the exact update 2 atanh(tanh(a/2) tanh(b/2)).
module tb_ldpc_cnu_op2;
  logic signed [7:0] a, b, y;
  int checks = 0, failures = 0;

  ldpc_cnu_op2 #(.W(8)) u_dut (.a, .b, .y);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real f(input real v);
    return $ln(1.0 + $exp(-((v < 0.0) ? -v : v)));
  endfunction

  function automatic real ref_msc(input real ra, input real rb);
    real m;
    m = ((ra < 0.0) ? -ra : ra) < ((rb < 0.0) ? -rb : rb) ? ((ra < 0.0) ? -ra : ra)
                                                          : ((rb < 0.0) ? -rb : rb);
    if ((ra < 0.0) != (rb < 0.0)) m = -m;
    m = m + f(ra + rb) - f(ra - rb);
    return (m > 127.0/16.0) ? 127.0/16.0 : (m < -8.0) ? -8.0 : m;
  endfunction

  function automatic real atanh(input real v);
    return 0.5 * $ln((1.0 + v) / (1.0 - v));
  endfunction

  task automatic apply(input int ia, input int ib);
    real ra, rb, got, r1, r2;
    a = 8'(ia); b = 8'(ib);
    #1;
    ra = real'(ia) / 16.0; rb = real'(ib) / 16.0; got = real'(y) / 16.0;
    r1 = ref_msc(ra, rb);
    check(got - r1 <= 0.1875 && r1 - got <= 0.1875, $sformatf("a=%0d b=%0d y=%0d ref %f", ia, ib, y, r1));
    if (ra != 0.0 && rb != 0.0 && ((ra < 0.0) ? -ra : ra) < 6.0 && ((rb < 0.0) ? -rb : rb) < 6.0) begin
      r2 = 2.0 * atanh($tanh(ra / 2.0) * $tanh(rb / 2.0));
      check(got - r2 <= 0.25 && r2 - got <= 0.25, $sformatf("a=%0d b=%0d y=%0d exact %f", ia, ib, y, r2));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 2.0 and 1.0: min 16, f(3.0)=1, f(1.0)=5 -> 12
    a = 8'sd32; b = 8'sd16; #1 check(y == 8'sd12, $sformatf("op2(2,1)=%0d, expected 12", y));
    a = -8'sd32; b = 8'sd16; #1 check(y == -8'sd12, $sformatf("op2(-2,1)=%0d, expected -12", y));
    a = 8'sd127; b = 8'sd127; #1 check(y == 8'sd116, $sformatf("op2(127,127)=%0d, expected 116", y));
    a = -8'sd128; b = -8'sd128; #1 check(y == 8'sd117, $sformatf("op2(-128,-128)=%0d, expected 117", y));
    a = 8'sd0; b = 8'sd0; #1 check(y == 8'sd0, "op2(0,0)=0");
    for (int i = 0; i < 3000; i++) apply($signed(8'($urandom)), $signed(8'($urandom)));
    for (int i = -128; i < 128; i += 17) for (int j = -128; j < 128; j += 13) apply(i, j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
