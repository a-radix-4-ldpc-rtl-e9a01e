// Testbench of ldpc_msg_bank. A model of every edge message, msg[row][col][j] for check j of
// block row row and bit (j + s) mod Z of block column col, is kept here. The testbench loads a
// frame, then runs check node phases, bit node phases and one slot with a check node and a bit
// node phase at once, for Z=81 and Z=27. In each issue cycle t it checks, one cycle later, that
// the CNU inputs are the messages of check idx of each row of the group (with the right degree
// select) and that the BNU inputs are the messages of bit idx of each column of the group in
// the rows where that column has a sub-block (masked to 0 elsewhere). It drives new random
// results in cycle t+2 and updates the model, so later reads also prove the write-back
// addresses. bnu_wr_* must follow the BNU issue by two cycles.
module tb_ldpc_msg_bank;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode = MODE_Z81;
  logic [6:0] z = 7'd81;
  logic ld_valid = 1'b0;
  logic [4:0] ld_col = '0;
  logic [6:0] ld_k = '0;
  logic signed [7:0] ld_llr = '0;
  logic cnu_rd = 1'b0, bnu_rd = 1'b0;
  logic [1:0] cnu_grp = '0, bnu_grp = '0;
  logic [6:0] idx = '0;
  logic cnu_valid, bnu_valid, bnu_wr_v;
  logic cnu_deg8 [4];
  logic signed [7:0] cnu_q [4][8];
  logic signed [7:0] cnu_r [4][8];
  logic [11:0] bnu_mask [8];
  logic signed [7:0] bnu_r [8][12];
  logic signed [7:0] bnu_q [8][12];
  logic [1:0] bnu_wr_grp;
  logic [6:0] bnu_wr_k;
  int checks = 0, failures = 0;

  int msg [12][24][81];
  int m_i, zz;

  ldpc_msg_bank #(.ZMAX(81), .W(8)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int shift_of(input int r, input int c);
    int sl;
    sl = COL_SLOT[m_i][c][r];
    return (sl < 0) ? -1 : SLOT_SHIFT[m_i][r][sl];
  endfunction

  // one slot: cg/bg = group or -1
  task automatic slot(input int cg, input int bg);
    int pc_v, pb_v, pc_j, pb_k;        // issue of the current cycle
    int rc [4][8];
    int rb [8][12];
    bit have_c, have_b;
    int hc_j, hb_k, hc_g, hb_g;
    pc_v = 0; pb_v = 0; pc_j = 0; pb_k = 0;
    have_c = 0; have_b = 0;
    hc_j = 0; hb_k = 0; hc_g = 0; hb_g = 0;
    for (int t = 0; t < zz + 2; t++) begin
      @(negedge clk);
      cnu_rd = (t < zz) && (cg >= 0);
      bnu_rd = (t < zz) && (bg >= 0);
      cnu_grp = 2'((cg < 0) ? 0 : cg);
      bnu_grp = 2'((bg < 0) ? 0 : bg);
      idx = 7'((t < zz) ? t : 0);
      @(posedge clk); #1;
      pc_v = int'(cnu_rd); pb_v = int'(bnu_rd); pc_j = t; pb_k = t;
      // results of the issue two cycles back are written in this cycle
      if (have_c) begin
        for (int u = 0; u < 4; u++) for (int e = 0; e < 8; e++) begin
          cnu_r[u][e] = 8'(rc[u][e]);
          if (e < ROW_DEG[m_i][4*hc_g+u]) msg[4*hc_g+u][SLOT_COL[m_i][4*hc_g+u][e]][hc_j] = rc[u][e];
        end
      end
      if (have_b) begin
        check(bnu_wr_v && int'(bnu_wr_grp) == hb_g && int'(bnu_wr_k) == hb_k, "bnu_wr follows the issue");
        for (int v = 0; v < 8; v++) for (int i = 0; i < 12; i++) begin
          int c, s;
          c = 8*hb_g + v;
          s = shift_of(i, c);
          bnu_q[v][i] = 8'(rb[v][i]);
          if (s >= 0) msg[i][c][(hb_k - s + zz) % zz] = rb[v][i];
        end
      end
      have_c = 0; have_b = 0;
      // data of this cycle's issue are visible one cycle later, i.e. now
      check(cnu_valid == 1'(pc_v) && bnu_valid == 1'(pb_v), "valid one cycle after issue");
      if (pc_v) begin
        for (int u = 0; u < 4; u++) begin
          int r;
          r = 4*cg + u;
          check(cnu_deg8[u] == (ROW_DEG[m_i][r] == 8), "degree select");
          for (int e = 0; e < ROW_DEG[m_i][r]; e++)
            check(int'(cnu_q[u][e]) == msg[r][SLOT_COL[m_i][r][e]][pc_j],
                  $sformatf("cnu %0d edge %0d check %0d", u, e, pc_j));
          for (int e = 0; e < 8; e++) rc[u][e] = int'($urandom % 256) - 128;
        end
        have_c = 1; hc_j = pc_j; hc_g = cg;
      end
      if (pb_v) begin
        for (int v = 0; v < 8; v++) for (int i = 0; i < 12; i++) begin
          int c, s;
          c = 8*bg + v;
          s = shift_of(i, c);
          check(bnu_mask[v][i] == (s >= 0), "bnu mask");
          if (s >= 0) check(int'(bnu_r[v][i]) == msg[i][c][(pb_k - s + zz) % zz],
                            $sformatf("bnu %0d row %0d bit %0d", v, i, pb_k));
          else check(bnu_r[v][i] == 8'sd0, "masked input is 0");
          rb[v][i] = int'($urandom % 256) - 128;
        end
        have_b = 1; hb_k = pb_k; hb_g = bg;
      end
    end
  endtask

  task automatic frame(input int m);
    m_i = m;
    zz = (m == 0) ? 27 : (m == 1) ? 54 : 81;
    mode = mode_e'(m); z = 7'(zz);
    for (int c = 0; c < 24; c++)
      for (int k = 0; k < zz; k++) begin
        int v;
        v = int'($urandom % 256) - 128;
        @(negedge clk);
        ld_valid = 1; ld_col = 5'(c); ld_k = 7'(k); ld_llr = 8'(v);
        for (int r = 0; r < 12; r++) begin
          int s;
          s = shift_of(r, c);
          if (s >= 0) msg[r][c][(k - s + zz) % zz] = v;
        end
      end
    @(negedge clk); ld_valid = 0;
    slot(0, -1);
    slot(1, -1);
    slot(2, 0);     // overlapped
    slot(-1, 1);
    slot(0, 2);     // overlapped
    slot(1, -1);
    slot(-1, 0);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < 4; u++) for (int e = 0; e < 8; e++) cnu_r[u][e] = '0;
    for (int v = 0; v < 8; v++) for (int i = 0; i < 12; i++) bnu_q[v][i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    frame(2);
    frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
