// End-to-end testbench of ldpc_decoder at its default size (Z up to 81).
//
// For each frame the testbench draws random information bits, encodes them with its own
// encoder for the standard (dual-diagonal) 802.11n rate-1/2 parity structure, checks the
// codeword against every parity check, sends it over a BPSK/AWGN channel, quantises the LLRs
// 2y/sigma^2 to signed Q4.4 and feeds them to the decoder. It then compares
//  * the decoded word with the transmitted codeword (frames at a noise level the code corrects),
//  * parity_ok with the syndrome the testbench computes on the decoder's output,
//  * the decoding time with (Z+2)*(1+4*iter) cycles.
// The standard Z=81 base matrix is written out below and compared with the reordered tables
// of ldpc_pkg (the Z=27/54 matrices are rebuilt from those tables).
// Mechanisms counted, each must occur: all three modes, 1 and 7 iterations, slots where the
// check node and bit node phases overlap, degree-7 and degree-8 check rows, channel errors
// corrected, a frame that fails the parity check, gaps in the input stream and mode changes
// between frames.
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int ZM = ldpc_pkg::ZMAX;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  mode_e cfg_mode = MODE_Z81;
  logic [2:0] cfg_iter = 3'd1;
  logic in_valid = 1'b0;
  logic signed [7:0] in_llr = '0;
  logic in_ready, out_valid, out_last, parity_ok, dec_done, busy;
  logic [4:0] out_col;
  logic [ZM-1:0] out_bits;

  ldpc_decoder u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mode[3] = '{0, 0, 0};
  int n_iter1 = 0, n_iter7 = 0, n_overlap = 0, n_deg7 = 0, n_deg8 = 0;
  int n_corrected = 0, n_parity_fail = 0, n_stall = 0, n_switch = 0, prev_mode = -1;
  int cyc = 0;

  localparam int H81 [12][24] = '{
    '{ 57,  -1,  -1,  -1,  50,  -1,  11,  -1,  50,  -1,  79,  -1,   1,   0,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1},
    '{  3,  -1,  28,  -1,   0,  -1,  -1,  -1,  55,   7,  -1,  -1,  -1,   0,   0,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1},
    '{ 30,  -1,  -1,  -1,  24,  37,  -1,  -1,  56,  14,  -1,  -1,  -1,  -1,   0,   0,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1},
    '{ 62,  53,  -1,  -1,  53,  -1,  -1,   3,  35,  -1,  -1,  -1,  -1,  -1,  -1,   0,   0,  -1,  -1,  -1,  -1,  -1,  -1,  -1},
    '{ 40,  -1,  -1,  20,  66,  -1,  -1,  22,  28,  -1,  -1,  -1,  -1,  -1,  -1,  -1,   0,   0,  -1,  -1,  -1,  -1,  -1,  -1},
    '{  0,  -1,  -1,  -1,   8,  -1,  42,  -1,  50,  -1,  -1,   8,  -1,  -1,  -1,  -1,  -1,   0,   0,  -1,  -1,  -1,  -1,  -1},
    '{ 69,  79,  79,  -1,  -1,  -1,  56,  -1,  52,  -1,  -1,  -1,   0,  -1,  -1,  -1,  -1,  -1,   0,   0,  -1,  -1,  -1,  -1},
    '{ 65,  -1,  -1,  -1,  38,  57,  -1,  -1,  72,  -1,  27,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,   0,   0,  -1,  -1,  -1},
    '{ 64,  -1,  -1,  -1,  14,  52,  -1,  -1,  30,  -1,  -1,  32,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,   0,   0,  -1,  -1},
    '{ -1,  45,  -1,  70,   0,  -1,  -1,  -1,  77,   9,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,   0,   0,  -1},
    '{  2,  56,  -1,  57,  35,  -1,  -1,  -1,  -1,  -1,  12,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,   0,   0},
    '{ 24,  -1,  61,  -1,  60,  -1,  -1,  27,  51,  -1,  -1,  16,   1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,   0}};

  int hb [12][24];          // standard-order base matrix of the current mode
  bit cw [24*81];           // codeword
  bit dec [24*81];          // decoder output
  int llr_q [24*81];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // base matrix in standard order from the reordered tables
  task automatic build_hb(input int m);
    for (int r = 0; r < 12; r++) for (int c = 0; c < 24; c++) hb[r][c] = -1;
    for (int r = 0; r < 12; r++)
      for (int e = 0; e < ROW_DEG[m][r]; e++)
        hb[ORIG_ROW[m][r]][ORIG_COL[m][SLOT_COL[m][r][e]]] = SLOT_SHIFT[m][r][e];
  endtask

  // number of unsatisfied checks of word w
  function automatic int syndrome_weight(input int z, ref bit w [24*81]);
    int n;
    n = 0;
    for (int r = 0; r < 12; r++)
      for (int j = 0; j < z; j++) begin
        bit p;
        p = 0;
        for (int c = 0; c < 24; c++)
          if (hb[r][c] >= 0) p ^= w[c*z + (j + hb[r][c]) % z];
        n += int'(p);
      end
    return n;
  endfunction

  // systematic encoding: lambda_i = sum_j P^s u_j, p0 = sum lambda, then the dual diagonal
  task automatic encode(input int z);
    bit lam [12][81];
    bit p0 [81];
    for (int b = 0; b < 12*z; b++) cw[b] = 1'($urandom);
    for (int r = 0; r < 12; r++)
      for (int k = 0; k < z; k++) begin
        lam[r][k] = 0;
        for (int c = 0; c < 12; c++)
          if (hb[r][c] >= 0) lam[r][k] ^= cw[c*z + (k + hb[r][c]) % z];
      end
    for (int k = 0; k < z; k++) begin
      p0[k] = 0;
      for (int r = 0; r < 12; r++) p0[k] ^= lam[r][k];
      cw[12*z + k] = p0[k];
    end
    // row 0: lam0 + P^s0 p0 + p1 = 0
    for (int k = 0; k < z; k++) cw[13*z + k] = lam[0][k] ^ p0[(k + hb[0][12]) % z];
    // rows 1..10: lam_r + (row has p0 ? P^s p0) + p_r + p_{r+1} = 0
    for (int r = 1; r < 11; r++)
      for (int k = 0; k < z; k++) begin
        bit t;
        t = lam[r][k] ^ cw[(12+r)*z + k];
        if (hb[r][12] >= 0) t ^= p0[(k + hb[r][12]) % z];
        cw[(13+r)*z + k] = t;
      end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // one frame; good = noise level at which the frame must be decoded correctly
  task automatic run_frame(input int m, input int iter, input real sigma, input bit good,
                           input bit expect_fail);
    int z, n, raw_err, dec_err, t0, t1, sw;
    bit got_ok;
    z = (m == 0) ? 27 : (m == 1) ? 54 : 81;
    n = 24 * z;
    build_hb(m);
    encode(z);
    check(syndrome_weight(z, cw) == 0, "testbench encoder produced a codeword");
    raw_err = 0;
    for (int b = 0; b < n; b++) begin
      real y, l;
      y = (cw[b] ? -1.0 : 1.0) + sigma * gauss();
      l = 2.0 * y / (sigma * sigma) * 16.0;
      llr_q[b] = (l > 127.0) ? 127 : (l < -128.0) ? -128 : int'(l);
      if ((llr_q[b] < 0) != cw[b]) raw_err++;
    end
    // load
    @(negedge clk);
    cfg_mode = mode_e'(m);
    cfg_iter = 3'(iter);
    if (m != prev_mode) n_switch++;
    prev_mode = m;
    for (int b = 0; b < n; b++) begin
      // occasional gaps in the input stream
      if (b > 0 && ($urandom % 16) == 0) begin
        in_valid = 1'b0;
        n_stall++;
        @(negedge clk);
        check(in_ready, "in_ready stays high during an input gap");
      end
      in_valid = 1'b1;
      in_llr   = 8'(llr_q[b]);
      @(posedge clk);
      if (!in_ready) begin
        check(0, "in_ready during load");
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    check(in_ready == 1'b0, "in_ready low after a full frame");
    // decode: time from the first issue cycle to dec_done
    t0 = -1;
    while (1) begin
      @(posedge clk);
      if (t0 < 0 && (u_dut.cnu_rd || u_dut.bnu_rd)) t0 = cyc;
      if (u_dut.cnu_rd && u_dut.bnu_rd) n_overlap++;
      if (u_dut.cnu_valid) begin
        for (int u = 0; u < 4; u++) if (u_dut.cnu_deg8[u]) n_deg8++; else n_deg7++;
      end
      if (dec_done) break;
    end
    t1 = cyc;
    check(t1 - t0 + 1 == (z + 2) * (1 + 4 * iter),
          $sformatf("decoding time %0d cycles, expected %0d", t1 - t0 + 1, (z + 2) * (1 + 4 * iter)));
    // collect output
    for (int c = 0; c < 24; c++) begin
      do @(posedge clk); while (!out_valid);
      check(out_col == 5'(c), "output column order");
      for (int k = 0; k < z; k++) dec[c*z + k] = out_bits[k];
      for (int k = z; k < ZM; k++) check(out_bits[k] == 1'b0, "unused output bits zero");
      check(out_last == (c == 23), "out_last");
      got_ok = parity_ok;
    end
    sw = syndrome_weight(z, dec);
    check(got_ok == (sw == 0), $sformatf("parity_ok=%0d but output syndrome weight %0d", got_ok, sw));
    dec_err = 0;
    for (int b = 0; b < n; b++) if (dec[b] != cw[b]) dec_err++;
    if (good) begin
      check(dec_err == 0, $sformatf("mode %0d: %0d bit errors after decoding", m, dec_err));
      check(got_ok, "parity_ok on a correctable frame");
      if (raw_err > 0 && dec_err == 0) n_corrected++;
    end
    if (expect_fail) check(!got_ok, "parity_ok low on an uncorrectable frame");
    if (!got_ok) n_parity_fail++;
    n_mode[m]++;
    if (iter == 1) n_iter1++;
    if (iter == 7) n_iter7++;
    $display("frame mode=%0d Z=%0d iter=%0d sigma=%0.2f channel errors=%0d decoded errors=%0d parity_ok=%0d cycles=%0d",
             m, z, iter, sigma, raw_err, dec_err, got_ok, t1 - t0 + 1);
    do @(posedge clk); while (busy);
  endtask

  always @(posedge clk) cyc++;

  initial begin
    // watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the package tables reproduce the standard Z=81 matrix
    build_hb(2);
    for (int r = 0; r < 12; r++) for (int c = 0; c < 24; c++)
      check(hb[r][c] == H81[r][c], $sformatf("Z=81 base matrix entry (%0d,%0d)", r, c));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // noise-free, one iteration, each mode
    run_frame(2, 1, 0.05, 1, 0);
    run_frame(0, 1, 0.05, 1, 0);
    run_frame(1, 1, 0.05, 1, 0);
    // channel errors that the code corrects
    run_frame(2, 7, 0.60, 1, 0);
    run_frame(1, 7, 0.60, 1, 0);
    run_frame(0, 7, 0.60, 1, 0);
    run_frame(2, 5, 0.62, 1, 0);
    // far too noisy: parity check must fail
    run_frame(2, 1, 1.60, 0, 1);
    // and recovery afterwards
    run_frame(0, 3, 0.05, 1, 0);
    run_frame(0, 5, 0.55, 1, 0);
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all three modes ran");
    check(n_iter1 > 0, "a one-iteration frame ran");
    check(n_iter7 > 0, "a seven-iteration frame ran");
    check(n_overlap > 0, "check and bit node phases overlapped");
    check(n_deg7 > 0 && n_deg8 > 0, "degree-7 and degree-8 rows processed");
    check(n_corrected > 0, "channel errors were corrected");
    check(n_parity_fail > 0, "a frame failed the parity check");
    check(n_stall > 0, "input gaps occurred");
    check(n_switch > 3, "the mode changed between frames");
    $display("mechanisms: modes=%0d/%0d/%0d iter1=%0d iter7=%0d overlap_cycles=%0d deg7=%0d deg8=%0d corrected=%0d parity_fail=%0d stalls=%0d mode_switches=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_iter1, n_iter7, n_overlap, n_deg7, n_deg8, n_corrected, n_parity_fail, n_stall, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
