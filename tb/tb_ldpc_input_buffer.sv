// Testbench of ldpc_input_buffer. A full frame of each mode is streamed in with random gaps;
// every write must carry the LLR of standard bit n*Z+k, k, and the reordered column of
// standard column n, one cycle after acceptance. For Z=81 the column order is compared with
// the reordered matrix listed here (reordered column 1..24 <- standard column 7, 11, 13, 12,
// 24, 23, 22, 21, 5, 1, 9, 2, 10, 6, 4, 14, 3, 8, 20, 19, 18, 17, 16, 15); for all modes the
// mapping must be a permutation. last must mark exactly the 24*Z-th LLR.
module tb_ldpc_input_buffer;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode = MODE_Z81;
  logic accept = 1'b0;
  logic signed [7:0] llr = '0;
  logic last, wr_valid;
  logic [4:0] wr_col;
  logic [6:0] wr_k;
  logic signed [7:0] wr_llr;
  int checks = 0, failures = 0;
  localparam int PUBLISHED_ORDER [24] = '{7, 11, 13, 12, 24, 23, 22, 21, 5, 1, 9, 2, 10, 6, 4, 14, 3, 8, 20, 19, 18, 17, 16, 15};

  ldpc_input_buffer #(.ZMAX(81), .W(8)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic frame(input int m);
    int zz;
    int col_of [24];
    bit used [24];
    zz = (m == 0) ? 27 : (m == 1) ? 54 : 81;
    mode = mode_e'(m);
    for (int i = 0; i < 24; i++) begin col_of[i] = -1; used[i] = 0; end
    for (int n = 0; n < 24; n++)
      for (int k = 0; k < zz; k++) begin
        int v;
        @(negedge clk);
        while ($urandom % 4 == 0) begin accept = 0; @(negedge clk); end
        v = ((n * 7 + k * 3) % 256) - 128;
        accept = 1; llr = 8'(v);
        #1 check(last == (n == 23 && k == zz - 1), "last on the final LLR only");
        @(posedge clk); #1;
        check(wr_valid, "wr_valid after accept");
        check(int'(wr_k) == k, "wr_k");
        check(int'(wr_llr) == v, "wr_llr");
        if (col_of[n] < 0) col_of[n] = int'(wr_col);
        check(int'(wr_col) == col_of[n], "one reordered column per standard column");
        @(negedge clk); accept = 0;
        #1;
        @(posedge clk); #1 check(!wr_valid, "no write without accept");
      end
    for (int n = 0; n < 24; n++) begin
      check(!used[col_of[n]], "column mapping is a permutation");
      used[col_of[n]] = 1;
      if (m == 2) check(col_of[PUBLISHED_ORDER[n] - 1] == n, $sformatf("Z=81 reordered column %0d", n + 1));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    frame(2);
    frame(0);
    frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
