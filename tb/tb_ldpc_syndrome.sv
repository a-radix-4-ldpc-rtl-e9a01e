// Testbench of ldpc_syndrome. Words are given in the reordered column order the decoder
// stores. For each mode: the all-zero word and random codewords (encoded here in standard
// order with the dual-diagonal parity structure and permuted) must pass; a codeword with one
// or two flipped bits and random words must give the result of the syndrome computed here.
// done must come 3*Z+1 cycles after start.
module tb_ldpc_syndrome;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode = MODE_Z81;
  logic [6:0] z = 7'd81;
  logic [80:0] hd [24];
  logic start = 1'b0, done, ok;
  int checks = 0, failures = 0, n_pass = 0, n_fail = 0;
  int hb [12][24];
  bit cw [24*81];

  ldpc_syndrome #(.ZMAX(81)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic build_hb(input int m);
    for (int r = 0; r < 12; r++) for (int c = 0; c < 24; c++) hb[r][c] = -1;
    for (int r = 0; r < 12; r++)
      for (int e = 0; e < ROW_DEG[m][r]; e++)
        hb[ORIG_ROW[m][r]][ORIG_COL[m][SLOT_COL[m][r][e]]] = SLOT_SHIFT[m][r][e];
  endtask

  function automatic bit word_ok(input int zz);
    for (int r = 0; r < 12; r++)
      for (int j = 0; j < zz; j++) begin
        bit p;
        p = 0;
        for (int c = 0; c < 24; c++) if (hb[r][c] >= 0) p ^= cw[c*zz + (j + hb[r][c]) % zz];
        if (p) return 0;
      end
    return 1;
  endfunction

  task automatic encode(input int zz);
    bit lam [12][81];
    bit p0 [81];
    for (int b = 0; b < 12*zz; b++) cw[b] = 1'($urandom);
    for (int r = 0; r < 12; r++)
      for (int k = 0; k < zz; k++) begin
        lam[r][k] = 0;
        for (int c = 0; c < 12; c++) if (hb[r][c] >= 0) lam[r][k] ^= cw[c*zz + (k + hb[r][c]) % zz];
      end
    for (int k = 0; k < zz; k++) begin
      p0[k] = 0;
      for (int r = 0; r < 12; r++) p0[k] ^= lam[r][k];
      cw[12*zz + k] = p0[k];
    end
    for (int k = 0; k < zz; k++) cw[13*zz + k] = lam[0][k] ^ p0[(k + hb[0][12]) % zz];
    for (int r = 1; r < 11; r++)
      for (int k = 0; k < zz; k++) begin
        bit t;
        t = lam[r][k] ^ cw[(12+r)*zz + k];
        if (hb[r][12] >= 0) t ^= p0[(k + hb[r][12]) % zz];
        cw[(13+r)*zz + k] = t;
      end
  endtask

  task automatic run(input int m, input int zz, input string what);
    bit expect_ok;
    int t;
    expect_ok = word_ok(zz);
    for (int c = 0; c < 24; c++) hd[c] = '0;
    for (int c = 0; c < 24; c++)
      for (int k = 0; k < zz; k++) hd[NEW_COL[m][c]][k] = cw[c*zz + k];
    // bits above Z must not matter
    for (int c = 0; c < 24; c++) for (int k = zz; k < 81; k++) hd[c][k] = 1'($urandom);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; if (t > 400) break; end
    check(t == 3 * zz + 1, $sformatf("%s: done after %0d cycles", what, t));
    check(ok == expect_ok, $sformatf("%s: ok=%0d expected %0d", what, ok, expect_ok));
    if (ok) n_pass++; else n_fail++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 3; m++) begin
      int zz;
      zz = (m == 0) ? 27 : (m == 1) ? 54 : 81;
      mode = mode_e'(m); z = 7'(zz);
      build_hb(m);
      for (int b = 0; b < 24*zz; b++) cw[b] = 0;
      run(m, zz, "zero word");
      for (int n = 0; n < 3; n++) begin
        encode(zz);
        check(word_ok(zz), "encoder gives a codeword");
        run(m, zz, "codeword");
        cw[$urandom % (24*zz)] ^= 1;
        run(m, zz, "one bit flipped");
        cw[$urandom % (24*zz)] ^= 1;
        run(m, zz, "two bits flipped");
      end
      for (int b = 0; b < 24*zz; b++) cw[b] = 1'($urandom);
      run(m, zz, "random word");
    end
    check(n_pass > 0 && n_fail > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
