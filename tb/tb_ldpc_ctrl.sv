// Testbench of ldpc_ctrl. For several modes and iteration counts it plays the input buffer
// (ib_last on the 24*Z-th accepted LLR), the syndrome unit and the output stage, records for
// every DECODE cycle which row group the CNUs and which column group the BNUs work on, and
// compares that with the slot list of the overlapped schedule written out here:
//   C0, then per iteration C1 | C2+B0 | B1 | B2 (+C0 except after the last iteration),
// each slot being Z issue cycles with idx = 0..Z-1 followed by two idle cycles. It also checks
// the total (Z+2)*(1+4*iter), the handshakes and that cfg is sampled at frame start.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mode_e cfg_mode = MODE_Z27;
  logic [2:0] cfg_iter = 3'd1;
  logic in_valid = 1'b0, in_ready, ib_last = 1'b0;
  mode_e mode;
  logic [6:0] z, idx;
  logic cnu_rd, bnu_rd, dec_done, synd_start, synd_done = 1'b0, out_start, out_done = 1'b0, busy;
  logic [1:0] cnu_grp, bnu_grp;
  int checks = 0, failures = 0;

  ldpc_ctrl #(.ZMAX(81)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int m, input int iter);
    int zz, nslot, c;
    int exp_c[$], exp_b[$];     // group per slot, -1 when idle
    zz = (m == 0) ? 27 : (m == 1) ? 54 : 81;
    exp_c.push_back(0); exp_b.push_back(-1);
    for (int it = 1; it <= iter; it++) begin
      exp_c.push_back(1);  exp_b.push_back(-1);
      exp_c.push_back(2);  exp_b.push_back(0);
      exp_c.push_back(-1); exp_b.push_back(1);
      exp_c.push_back(it < iter ? 0 : -1); exp_b.push_back(2);
    end
    nslot = exp_c.size();
    // load 24*Z LLRs, then change cfg to see that it was sampled
    @(negedge clk);
    cfg_mode = mode_e'(m); cfg_iter = 3'(iter);
    for (int n = 0; n < 24 * zz; n++) begin
      in_valid = 1'b1;
      ib_last  = (n == 24 * zz - 1);
      #1 check(in_ready, "in_ready during load");
      @(negedge clk);
      cfg_mode = MODE_Z81; cfg_iter = 3'd7;
    end
    in_valid = 1'b0; ib_last = 1'b0;
    #1 check(!in_ready, "in_ready low after the frame");
    check(mode == mode_e'(m) && z == 7'(zz), "mode sampled at frame start");
    // wait for the first issue cycle
    c = 0;
    while (!(cnu_rd || bnu_rd)) begin @(negedge clk); c++; check(c < 5, "decode starts"); end
    for (int s = 0; s < nslot; s++) begin
      for (int t = 0; t < zz + 2; t++) begin
        bit act;
        act = (t < zz);
        check(cnu_rd == (act && exp_c[s] >= 0), $sformatf("slot %0d cycle %0d cnu_rd", s, t));
        check(bnu_rd == (act && exp_b[s] >= 0), $sformatf("slot %0d cycle %0d bnu_rd", s, t));
        if (cnu_rd) check(int'(cnu_grp) == exp_c[s], "cnu group");
        if (bnu_rd) check(int'(bnu_grp) == exp_b[s], "bnu group");
        if (act) check(int'(idx) == t, "idx counts 0..Z-1");
        check(dec_done == (s == nslot - 1 && t == zz + 1), "dec_done in the last cycle");
        check(busy, "busy while decoding");
        @(negedge clk);
      end
    end
    check(synd_start, "synd_start after decoding");
    @(negedge clk);
    check(!synd_start, "synd_start is a pulse");
    repeat (5) @(negedge clk);
    synd_done = 1'b1; @(negedge clk); synd_done = 1'b0;
    check(out_start, "out_start after synd_done");
    repeat (3) @(negedge clk);
    out_done = 1'b1; @(negedge clk); out_done = 1'b0;
    check(!busy && in_ready, "idle after out_done");
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
    run(0, 1);
    run(0, 2);
    run(1, 3);
    run(2, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
