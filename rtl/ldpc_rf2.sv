// Two-port register file: one read port and one write port usable in the same cycle.
//
// The decoder keeps one per nonzero sub-block slot of the parity check matrix; it holds the Z
// messages of that sub-block, which are bit-to-check messages after a bit node phase and
// check-to-bit messages after a check node phase. A read (re, raddr) returns the word on
// rdata in the next cycle; a write (we, waddr, wdata) is stored at the clock edge. A read and a
// write of the same address in one cycle return the old word. The contents are not reset.
module ldpc_rf2 #(
  parameter int DEPTH = 81,
  parameter int W     = 8,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
