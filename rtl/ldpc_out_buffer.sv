// Hard-decision buffer and output stage.
//
// The eight bit node units write the hard decision of bit wr_k of reordered block columns
// 8*wr_grp .. 8*wr_grp+7 in every bit node phase, so after the last iteration the buffer holds
// the decoded word. The whole buffer is visible on hd for the syndrome check. After a
// one-cycle start pulse it streams the word out, one block column per cycle in standard column
// order 0..23 (mapped through ORIG/NEW_COL), bits k = 0..Z-1 of the column on out_bits[k]
// (higher bits zero); out_last and done mark the 24th column. Outputs are registered.
module ldpc_out_buffer
  import ldpc_pkg::mode_e, ldpc_pkg::NEW_COL;
#(
  parameter int ZMAX = ldpc_pkg::ZMAX,
  parameter int AW   = $clog2(ZMAX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  mode_e           mode,
  input  logic [AW-1:0]   z,
  input  logic            wr_v,
  input  logic [1:0]      wr_grp,
  input  logic [AW-1:0]   wr_k,
  input  logic [7:0]      wr_bits,
  output logic [ZMAX-1:0] hd [24],
  input  logic            start,
  output logic            out_valid,
  output logic [4:0]      out_col,
  output logic [ZMAX-1:0] out_bits,
  output logic            out_last,
  output logic            done
);
  logic       run;
  logic [4:0] n;
  logic [ZMAX-1:0] zmask;

  always_comb begin
    for (int b = 0; b < ZMAX; b++) zmask[b] = (b < int'(z));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 24; c++) hd[c] <= '0;
      run       <= 1'b0;
      n         <= '0;
      out_valid <= 1'b0;
      out_col   <= '0;
      out_bits  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (wr_v) begin
        for (int v = 0; v < 8; v++) hd[8 * int'(wr_grp) + v][wr_k] <= wr_bits[v];
      end
      out_valid <= run;
      out_last  <= run && (n == 5'd23);
      if (run) begin
        out_col  <= n;
        out_bits <= hd[NEW_COL[mode][n]] & zmask;
      end
      if (start) begin
        run <= 1'b1;
        n   <= '0;
      end else if (run) begin
        if (n == 5'd23) run <= 1'b0;
        n <= n + 5'd1;
      end
    end
  end

  assign done = out_last;
endmodule
