// Testbench of ldpc_bnu: random channel values, messages and masks (including the column
// degrees 2, 3, 4, 11 and 12 of the codes) are streamed in; one cycle later each output must be
// the saturated difference between the a-posteriori sum and that input, and the hard decision
// the sign of the sum, both computed here.
module tb_ldpc_bnu;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid, hard;
  logic signed [7:0] ch = '0;
  logic [11:0] mask = '0;
  logic signed [7:0] r [12];
  logic signed [7:0] q [12];
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_sat = 0;

  ldpc_bnu #(.W(8), .NIN(12)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int degs[5] = '{2, 3, 4, 11, 12};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int rv[12];
      int p, d, cv;
      logic [11:0] mk;
      @(negedge clk);
      // a mask with one of the code's column degrees, random rows
      mk = '0;
      while ($countones(mk) < degs[n % 5]) mk[$urandom % 12] = 1'b1;
      cv = int'($urandom % 256) - 128;
      p = cv;
      for (int i = 0; i < 12; i++) begin
        rv[i] = int'($urandom % 256) - 128;
        r[i] = 8'(rv[i]);
        if (mk[i]) p += rv[i];
      end
      ch = 8'(cv);
      mask = mk;
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      check(out_valid, "out_valid one cycle after in_valid");
      check(hard == (p < 0), $sformatf("hard decision of sum %0d", p));
      if (p < 0) n_neg++; else n_pos++;
      for (int i = 0; i < 12; i++) if (mk[i]) begin
        d = p - rv[i];
        if (d > 127 || d < -128) n_sat++;
        d = (d > 127) ? 127 : (d < -128) ? -128 : d;
        check(int'(q[i]) == d, $sformatf("q[%0d]=%0d expected %0d", i, q[i], d));
      end
    end
    check(n_pos > 0 && n_neg > 0 && n_sat > 0, "both decisions and saturation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
