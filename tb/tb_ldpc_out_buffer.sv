// Testbench of ldpc_out_buffer. Random hard decisions are written through the BNU write port
// (eight reordered columns of a group per cycle), the hd array is compared with a model, and
// the output stream must give standard columns 0..23 in order, each the written bits of its
// reordered column with the bits above Z cleared, out_last/done on the 24th.
module tb_ldpc_out_buffer;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode = MODE_Z81;
  logic [6:0] z = 7'd81;
  logic wr_v = 1'b0;
  logic [1:0] wr_grp = '0;
  logic [6:0] wr_k = '0;
  logic [7:0] wr_bits = '0;
  logic [80:0] hd [24];
  logic start = 1'b0, out_valid, out_last, done;
  logic [4:0] out_col;
  logic [80:0] out_bits;
  int checks = 0, failures = 0;
  bit model [24][81];

  ldpc_out_buffer #(.ZMAX(81)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int m);
    int zz;
    zz = (m == 0) ? 27 : (m == 1) ? 54 : 81;
    mode = mode_e'(m); z = 7'(zz);
    for (int g = 0; g < 3; g++)
      for (int k = 0; k < zz; k++) begin
        @(negedge clk);
        wr_v = 1; wr_grp = 2'(g); wr_k = 7'(k); wr_bits = 8'($urandom);
        for (int v = 0; v < 8; v++) model[8*g+v][k] = wr_bits[v];
      end
    @(negedge clk); wr_v = 0;
    for (int c = 0; c < 24; c++) for (int k = 0; k < zz; k++)
      check(hd[c][k] == model[c][k], "hd array");
    start = 1; @(negedge clk); start = 0;
    for (int c = 0; c < 24; c++) begin
      @(posedge clk); #1;
      check(out_valid && int'(out_col) == c, $sformatf("column %0d valid", c));
      for (int k = 0; k < 81; k++)
        check(out_bits[k] == ((k < zz) ? model[NEW_COL[m][c]][k] : 1'b0), $sformatf("column %0d bit %0d", c, k));
      check(out_last == (c == 23) && done == (c == 23), "out_last/done");
    end
    @(posedge clk); #1 check(!out_valid, "stream ends after 24 columns");
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
    run(2);
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
