// Three-mode Radix-4 LDPC decoder for the rate-1/2 codes of IEEE 802.11n
// (Z = 27, 54, 81: codeword lengths 648, 1296 and 1944 bits).
//
// The decoder is partially parallel: four check node units (CNUs) each update one check node
// of a block row per cycle, eight bit node units (BNUs) each update one bit of a block column
// per cycle. The check node update uses the Radix-4 approximation (three messages combined in
// one operation unit with a max / second-max log-sum-exp and a piece-wise linear correction
// table), which needs two pipeline stages for the row degrees 7 and 8 of these codes.
//
// Data path: serial channel LLRs (signed Q4.4) -> input buffer -> channel memories (one-port,
// one per block column) and message memories (two-port, one per nonzero sub-block slot, all
// edges initialised with the channel LLR) -> alternating CNU and BNU phases that read and
// rewrite the message memories -> hard decisions (sign of the BNU sum) -> syndrome check ->
// output, one block column per cycle. The rows and columns of the parity check matrix are
// permuted so that check and bit node phases of different groups run in the same slot
// (see ldpc_ctrl): one decoding takes (Z+2)*(1+4*iter) cycles for 1..7 iterations.
//
// Interface: cfg_mode/cfg_iter are sampled with the first LLR of a frame; LLRs are accepted on
// in_valid && in_ready in standard bit order (24*Z values). The decoded word comes out on
// out_valid/out_col/out_bits (24 cycles, standard column order, out_last on the last one);
// parity_ok is high when the decoded word satisfies all parity checks and is valid from the
// first out_valid until the next frame's check. dec_done pulses in the last decoding cycle.
// busy is high from the first LLR to the last output column.
// rst_n is an asynchronous reset of the flip-flops and also disables the timing assertions
// below, which a lint tool may report as a signal used both synchronously and asynchronously.
module ldpc_decoder
  import ldpc_pkg::mode_e;
#(
  parameter int ZMAX = ldpc_pkg::ZMAX,
  parameter int W    = ldpc_pkg::W,
  parameter int AW   = $clog2(ZMAX)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mode_e               cfg_mode,
  input  logic [2:0]          cfg_iter,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_llr,
  output logic                in_ready,
  output logic                out_valid,
  output logic [4:0]          out_col,
  output logic [ZMAX-1:0]     out_bits,
  output logic                out_last,
  output logic                parity_ok,
  output logic                dec_done,
  output logic                busy
);
  mode_e               mode;
  logic [AW-1:0]       z;
  logic                ib_last;
  logic                ld_valid;
  logic [4:0]          ld_col;
  logic [AW-1:0]       ld_k;
  logic signed [W-1:0] ld_llr;
  logic                cnu_rd, bnu_rd;
  logic [1:0]          cnu_grp, bnu_grp;
  logic [AW-1:0]       idx;
  logic                synd_start, synd_done, out_start, out_done;

  logic                cnu_valid;
  logic                cnu_deg8 [4];
  logic signed [W-1:0] cnu_q    [4][8];
  logic signed [W-1:0] cnu_r    [4][8];
  logic                cnu_ovalid [4];
  logic                bnu_valid;
  logic [11:0]         bnu_mask [8];
  logic signed [W-1:0] bnu_r    [8][12];
  logic signed [W-1:0] bnu_q    [8][12];
  logic                bnu_ovalid [8];
  logic [7:0]          bnu_hard;
  logic                bnu_wr_v;
  logic [1:0]          bnu_wr_grp;
  logic [AW-1:0]       bnu_wr_k;
  logic signed [W-1:0] ch_rdata [24];
  logic [ZMAX-1:0]     hd [24];

  ldpc_ctrl #(.ZMAX(ZMAX)) u_ctrl (
    .clk, .rst_n, .cfg_mode, .cfg_iter, .in_valid, .in_ready, .ib_last, .mode, .z,
    .cnu_rd, .cnu_grp, .bnu_rd, .bnu_grp, .idx, .dec_done,
    .synd_start, .synd_done, .out_start, .out_done, .busy
  );

  ldpc_input_buffer #(.ZMAX(ZMAX), .W(W)) u_ib (
    .clk, .rst_n, .mode, .accept(in_valid && in_ready), .llr(in_llr), .last(ib_last),
    .wr_valid(ld_valid), .wr_col(ld_col), .wr_k(ld_k), .wr_llr(ld_llr)
  );

  // one-port memory bank: channel LLRs, one memory per reordered block column
  for (genvar c = 0; c < 24; c++) begin : g_ch
    logic ld_here, rd_here;
    assign ld_here = ld_valid && (int'(ld_col) == c);
    assign rd_here = bnu_rd && (int'(bnu_grp) == c / 8);
    ldpc_rf1 #(.DEPTH(ZMAX), .W(W)) u_rf (
      .clk, .en(ld_here | rd_here), .we(ld_here), .addr(ld_here ? ld_k : idx),
      .wdata(ld_llr), .rdata(ch_rdata[c])
    );
  end

  ldpc_msg_bank #(.ZMAX(ZMAX), .W(W)) u_bank (
    .clk, .rst_n, .mode, .z, .ld_valid, .ld_col, .ld_k, .ld_llr,
    .cnu_rd, .cnu_grp, .bnu_rd, .bnu_grp, .idx,
    .cnu_valid, .cnu_deg8, .cnu_q, .cnu_r,
    .bnu_valid, .bnu_mask, .bnu_r, .bnu_q, .bnu_wr_v, .bnu_wr_grp, .bnu_wr_k
  );

  for (genvar u = 0; u < 4; u++) begin : g_cnu
    ldpc_cnu #(.W(W)) u_cnu (
      .clk, .rst_n, .in_valid(cnu_valid), .deg8(cnu_deg8[u]), .q(cnu_q[u]),
      .out_valid(cnu_ovalid[u]), .r(cnu_r[u])
    );
    // a CNU result leaves its pipeline two cycles after the CNU read was issued
    a_cnu_timing: assert property (@(posedge clk) disable iff (!rst_n) cnu_rd |-> ##2 cnu_ovalid[u]);
  end

  // the BNUs of column group g read the channel memories of columns 8g..8g+7
  logic [1:0] bnu_grp1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bnu_grp1 <= '0;
    else        bnu_grp1 <= bnu_grp;
  end

  for (genvar v = 0; v < 8; v++) begin : g_bnu
    ldpc_bnu #(.W(W), .NIN(12)) u_bnu (
      .clk, .rst_n, .in_valid(bnu_valid), .ch(ch_rdata[8 * int'(bnu_grp1) + v]),
      .mask(bnu_mask[v]), .r(bnu_r[v]), .out_valid(bnu_ovalid[v]), .q(bnu_q[v]),
      .hard(bnu_hard[v])
    );
    // the bank writes the BNU results back in the cycle they leave the BNU
    a_bnu_timing: assert property (@(posedge clk) disable iff (!rst_n) bnu_ovalid[v] == bnu_wr_v);
  end

  ldpc_out_buffer #(.ZMAX(ZMAX)) u_ob (
    .clk, .rst_n, .mode, .z, .wr_v(bnu_wr_v), .wr_grp(bnu_wr_grp), .wr_k(bnu_wr_k),
    .wr_bits(bnu_hard), .hd, .start(out_start), .out_valid, .out_col, .out_bits, .out_last,
    .done(out_done)
  );

  ldpc_syndrome #(.ZMAX(ZMAX)) u_synd (
    .clk, .rst_n, .mode, .z, .hd, .start(synd_start), .done(synd_done), .ok(parity_ok)
  );
endmodule
