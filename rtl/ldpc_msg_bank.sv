// Message memory bank with its address generators and the routing to the node units.
//
// One two-port register file per (block row i, slot e) position: slot e of row i is the e-th
// nonzero sub-block of that row in the current mode (SLOT_COL/SLOT_SHIFT tables of ldpc_pkg).
// Word j of the memory holds the message on the edge between check j of the block row and
// bit (j + s) mod Z of the block column, s being the sub-block's cyclic shift.
//
// Access patterns (all addresses are computed here):
//  * load: bit k of reordered column ld_col is written into every memory of that column at
//    address (k - s) mod Z, so that all edges start with the channel LLR;
//  * check node phase of row group g: CNU u reads word idx of the eight memories of row 4g+u
//    and writes its results back to the same word two cycles later;
//  * bit node phase of column group g: BNU v handles bit idx of column 8g+v and, for each
//    block row i with a nonzero sub-block in that column, reads and later writes word
//    (idx - s) mod Z of that memory.
// Read data are routed to the units one cycle after the issue cycle (cnu_valid/bnu_valid) with
// the CNU degree selects and the BNU input masks; unit results are written two cycles after
// the issue cycle. The schedule never lets a check node phase and a bit node phase use the
// same memory in one cycle; an assertion checks this. bnu_wr_* give the column group and bit
// index of the BNU results for the hard-decision buffer.
// rst_n is an asynchronous reset of the flip-flops and also disables the ownership assertion,
// which a lint tool may report as a signal used both synchronously and asynchronously.
module ldpc_msg_bank
  import ldpc_pkg::mode_e, ldpc_pkg::SLOT_COL, ldpc_pkg::SLOT_SHIFT, ldpc_pkg::ROW_DEG,
         ldpc_pkg::COL_SLOT;
#(
  parameter int ZMAX = ldpc_pkg::ZMAX,
  parameter int W    = ldpc_pkg::W,
  parameter int AW   = $clog2(ZMAX)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mode_e               mode,
  input  logic [AW-1:0]       z,
  // load
  input  logic                ld_valid,
  input  logic [4:0]          ld_col,
  input  logic [AW-1:0]       ld_k,
  input  logic signed [W-1:0] ld_llr,
  // schedule
  input  logic                cnu_rd,
  input  logic [1:0]          cnu_grp,
  input  logic                bnu_rd,
  input  logic [1:0]          bnu_grp,
  input  logic [AW-1:0]       idx,
  // check node units
  output logic                cnu_valid,
  output logic                cnu_deg8 [4],
  output logic signed [W-1:0] cnu_q    [4][8],
  input  logic signed [W-1:0] cnu_r    [4][8],
  // bit node units
  output logic                bnu_valid,
  output logic [11:0]         bnu_mask [8],
  output logic signed [W-1:0] bnu_r    [8][12],
  input  logic signed [W-1:0] bnu_q    [8][12],
  output logic                bnu_wr_v,
  output logic [1:0]          bnu_wr_grp,
  output logic [AW-1:0]       bnu_wr_k
);
  logic          c_v1, b_v1, b_v2;
  logic [1:0]    c_g1, b_g1, b_g2;
  logic [AW-1:0] idx1, idx2;
  logic [W-1:0]  rdata [12][8];

  // (a - b) mod z for a, b < z
  function automatic logic [AW-1:0] sub_mod(input logic [AW-1:0] a, input logic [AW-1:0] b,
                                            input logic [AW-1:0] zz);
    return (a >= b) ? a - b : a + zz - b;
  endfunction

  for (genvar i = 0; i < 12; i++) begin : g_row
    for (genvar e = 0; e < 8; e++) begin : g_slot
      int            col;
      logic [AW-1:0] sh;
      logic          cown, bown, ldown;
      logic          cown1, cown2, bown1, bown2;
      logic [AW-1:0] eaddr, raddr, addr1, addr2, waddr;
      logic          we;
      logic [W-1:0]  wdata;

      always_comb begin
        col   = SLOT_COL[mode][i][e];
        sh    = AW'(SLOT_SHIFT[mode][i][e]);
        cown  = cnu_rd && (int'(cnu_grp) == i / 4) && (e < ROW_DEG[mode][i]);
        bown  = bnu_rd && (col >= 0) && (int'(bnu_grp) == col / 8);
        ldown = ld_valid && (col >= 0) && (int'(ld_col) == col);
        eaddr = sub_mod(bnu_rd ? idx : ld_k, (col >= 0) ? sh : '0, z);
        raddr = cown ? idx : eaddr;
        // write port: load, CNU result or BNU result
        if (ldown) begin
          we = 1'b1; waddr = eaddr; wdata = ld_llr;
        end else if (cown2) begin
          we = 1'b1; waddr = addr2; wdata = cnu_r[i % 4][e];
        end else if (bown2) begin
          we = 1'b1; waddr = addr2; wdata = bnu_q[(col >= 0) ? col % 8 : 0][i];
        end else begin
          we = 1'b0; waddr = addr2; wdata = '0;
        end
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          cown1 <= 1'b0; cown2 <= 1'b0; bown1 <= 1'b0; bown2 <= 1'b0;
          addr1 <= '0;   addr2 <= '0;
        end else begin
          cown1 <= cown; cown2 <= cown1;
          bown1 <= bown; bown2 <= bown1;
          addr1 <= raddr; addr2 <= addr1;
        end
      end

      ldpc_rf2 #(.DEPTH(ZMAX), .W(W)) u_rf (
        .clk, .re(cown | bown), .raddr, .rdata(rdata[i][e]),
        .we, .waddr, .wdata
      );

      // the reordered matrix keeps check and bit node phases of one slot apart
      a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) !(cown && bown));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_v1 <= 1'b0; b_v1 <= 1'b0; b_v2 <= 1'b0;
      c_g1 <= '0;   b_g1 <= '0;   b_g2 <= '0;
      idx1 <= '0;   idx2 <= '0;
    end else begin
      c_v1 <= cnu_rd;
      b_v1 <= bnu_rd; b_v2 <= b_v1;
      c_g1 <= cnu_grp;
      b_g1 <= bnu_grp; b_g2 <= b_g1;
      idx1 <= idx;     idx2 <= idx1;
    end
  end

  // routing of read data, one cycle after the issue cycle
  always_comb begin
    cnu_valid = c_v1;
    bnu_valid = b_v1;
    for (int u = 0; u < 4; u++) begin
      cnu_deg8[u] = (ROW_DEG[mode][4 * int'(c_g1) + u] == 8);
      for (int e = 0; e < 8; e++) cnu_q[u][e] = rdata[4 * int'(c_g1) + u][e];
    end
    for (int v = 0; v < 8; v++) begin
      for (int i = 0; i < 12; i++) begin
        int sl;
        sl = COL_SLOT[mode][8 * int'(b_g1) + v][i];
        bnu_mask[v][i] = (sl >= 0);
        bnu_r[v][i]    = (sl >= 0) ? rdata[i][sl[2:0]] : '0;
      end
    end
  end

  assign bnu_wr_v   = b_v2;
  assign bnu_wr_grp = b_g2;
  assign bnu_wr_k   = idx2;
endmodule
