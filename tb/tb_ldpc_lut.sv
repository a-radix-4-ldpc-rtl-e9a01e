// Testbench of ldpc_lut: every input value is compared with the piece-wise linear segments
// evaluated in real arithmetic (allowing the truncation of one LSB) and with the exact
// function log(1+e^-x) (within 0.1); a few points are checked against hand-computed codes.
module tb_ldpc_lut;
  logic [9:0] x;
  logic [3:0] y;
  int checks = 0, failures = 0;

  ldpc_lut #(.IW(10)) u_dut (.x, .y);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real pwl(input real v);
    if (v < 0.5)      return 0.6875 - v / 2.0;
    else if (v < 1.5) return 0.5625 - v / 4.0;
    else if (v < 2.0) return 0.375  - v / 8.0;
    else if (v < 3.0) return 0.25   - v / 16.0;
    else if (v < 4.5) return 0.125  - v / 32.0;
    else              return 0.0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      real v, got;
      x = 10'(i);
      #1;
      v   = real'(i) / 16.0;
      got = real'(y) / 16.0;
      check(got >= pwl(v) - 1e-9 && got < pwl(v) + 0.0625 - 1e-9,
            $sformatf("x=%0d y=%0d segment value %f", i, y, pwl(v)));
      check(got - $ln(1.0 + $exp(-v)) < 0.1 && got - $ln(1.0 + $exp(-v)) > -0.1,
            $sformatf("x=%0d y=%0d far from log(1+e^-x)", i, y));
    end
    x = 10'd0;  #1 check(y == 4'd11, "f(0) = 11/16");
    x = 10'd8;  #1 check(y == 4'd7,  "f(0.5) = 7/16");
    x = 10'd24; #1 check(y == 4'd3,  "f(1.5) = 3/16");
    x = 10'd48; #1 check(y == 4'd1,  "f(3.0) = 1/16");
    x = 10'd72; #1 check(y == 4'd0,  "f(4.5) = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
