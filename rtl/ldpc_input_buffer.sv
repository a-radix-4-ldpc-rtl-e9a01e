// Input buffer: turns the serial stream of channel LLRs into memory bank writes.
//
// LLRs arrive one per cycle (accept = in_valid && in_ready) in the standard bit order of the
// code: bit n*Z + k is bit k of standard block column n. The buffer counts n and k, maps n to
// the reordered block column the decoder works in (NEW_COL table of ldpc_pkg) and registers
// the LLR with that column and k. One cycle after acceptance wr_valid is high; the top writes
// wr_llr into the channel memory of column wr_col at address wr_k and into every message
// memory of that column (at the address of the bit's edge). last is combinational: high while
// the last LLR of the frame (n = 23, k = Z-1) is being accepted. The counters return to zero
// after it, ready for the next frame.
module ldpc_input_buffer
  import ldpc_pkg::mode_e, ldpc_pkg::mode_z, ldpc_pkg::NEW_COL;
#(
  parameter int ZMAX = ldpc_pkg::ZMAX,
  parameter int W    = ldpc_pkg::W,
  parameter int AW   = $clog2(ZMAX)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mode_e               mode,
  input  logic                accept,
  input  logic signed [W-1:0] llr,
  output logic                last,
  output logic                wr_valid,
  output logic [4:0]          wr_col,
  output logic [AW-1:0]       wr_k,
  output logic signed [W-1:0] wr_llr
);
  logic [4:0]    n;
  logic [AW-1:0] k;
  logic [AW-1:0] z;

  assign z    = mode_z(mode);
  assign last = accept && (n == 5'd23) && (k == z - AW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n        <= '0;
      k        <= '0;
      wr_valid <= 1'b0;
      wr_col   <= '0;
      wr_k     <= '0;
      wr_llr   <= '0;
    end else begin
      wr_valid <= accept;
      if (accept) begin
        wr_col <= 5'(NEW_COL[mode][n]);
        wr_k   <= k;
        wr_llr <= llr;
        if (k == z - AW'(1)) begin
          k <= '0;
          n <= (n == 5'd23) ? 5'd0 : n + 5'd1;
        end else begin
          k <= k + AW'(1);
        end
      end
    end
  end
endmodule
