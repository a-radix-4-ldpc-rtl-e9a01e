// Testbench of ldpc_rf1: random writes and reads against a model array; a read returns the
// stored word in the next cycle and holds it while the port is idle or writing.
module tb_ldpc_rf1;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [6:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [81];
  bit         known [81];
  int checks = 0, failures = 0;

  ldpc_rf1 #(.DEPTH(81), .W(8)) u_dut (.*);

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
    logic [7:0] last;
    bit have;
    have = 0;
    for (int a = 0; a < 81; a++) begin
      @(negedge clk); en = 1; we = 1; addr = 7'(a); wdata = 8'($urandom); model[a] = wdata; known[a] = 1;
    end
    for (int n = 0; n < 5000; n++) begin
      int op;
      @(negedge clk);
      op = $urandom % 3;
      en = (op != 2); we = (op == 1); addr = 7'($urandom % 81); wdata = 8'($urandom);
      if (op == 0) begin last = model[addr]; end
      if (op == 1) model[addr] = wdata;
      @(posedge clk); #1;
      if (op == 0) begin check(rdata == last, $sformatf("read addr %0d", addr)); have = 1; end
      else if (have) check(rdata == last, "rdata holds while not reading");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
