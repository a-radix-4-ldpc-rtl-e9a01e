// Testbench of ldpc_rf2: random simultaneous reads and writes against a model array; a read
// returns the word stored before the clock edge (old data when writing the same address).
module tb_ldpc_rf2;
  logic clk = 1'b0, re = 1'b0, we = 1'b0;
  logic [6:0] raddr = '0, waddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [81];
  int checks = 0, failures = 0, same = 0;

  ldpc_rf2 #(.DEPTH(81), .W(8)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 81; a++) begin
      @(negedge clk); we = 1; waddr = 7'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      logic [7:0] exp_d;
      @(negedge clk);
      re = 1'($urandom); we = 1'($urandom);
      raddr = 7'($urandom % 81);
      waddr = ($urandom % 4 == 0) ? raddr : 7'($urandom % 81);
      wdata = 8'($urandom);
      exp_d = model[raddr];
      if (re && we && raddr == waddr) same++;
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      if (re) check(rdata == exp_d, $sformatf("read addr %0d", raddr));
    end
    check(same > 0, "read and write of one address in one cycle occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
