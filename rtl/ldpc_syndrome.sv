// Syndrome check of the decoded word: tests H * v^T = 0 on the hard decisions.
//
// After a one-cycle start pulse the unit walks over the three row groups and, within a group,
// over the check index j = 0..Z-1, evaluating the four block rows of the group in parallel like
// the check node units do: check j of block row r is the XOR of hd[c][(j + s) mod Z] over the
// nonzero sub-blocks (c, s) of the row. Any failing check clears ok. The check takes 3*Z cycles;
// done pulses in the cycle after the last check and ok stays valid until the next start.
module ldpc_syndrome
  import ldpc_pkg::mode_e, ldpc_pkg::SLOT_COL, ldpc_pkg::SLOT_SHIFT;
#(
  parameter int ZMAX = ldpc_pkg::ZMAX,
  parameter int AW   = $clog2(ZMAX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  mode_e           mode,
  input  logic [AW-1:0]   z,
  input  logic [ZMAX-1:0] hd [24],
  input  logic            start,
  output logic            done,
  output logic            ok
);
  logic          run;
  logic [1:0]    g;
  logic [AW-1:0] j;
  logic          fail;

  // any of the four checks j of row group g unsatisfied
  always_comb begin
    fail = 1'b0;
    for (int u = 0; u < 4; u++) begin
      logic p;
      p = 1'b0;
      for (int e = 0; e < 8; e++) begin
        int c, s, b;
        c = SLOT_COL[mode][4 * int'(g) + u][e];
        s = SLOT_SHIFT[mode][4 * int'(g) + u][e];
        b = int'(j) + s;
        if (b >= int'(z)) b = b - int'(z);
        if (c >= 0) p ^= hd[c][b];
      end
      fail |= p;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      g    <= '0;
      j    <= '0;
      ok   <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run <= 1'b1;
        g   <= '0;
        j   <= '0;
        ok  <= 1'b1;
      end else if (run) begin
        if (fail) ok <= 1'b0;
        if (j == z - AW'(1)) begin
          j <= '0;
          if (g == 2'd2) begin
            run  <= 1'b0;
            done <= 1'b1;
          end else begin
            g <= g + 2'd1;
          end
        end else begin
          j <= j + AW'(1);
        end
      end
    end
  end
endmodule
