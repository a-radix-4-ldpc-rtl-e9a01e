// One-port register file (single address, read or write per cycle) with a registered read.
//
// The decoder keeps one of these per block column to hold the channel LLRs of that column:
// written once while a frame is loaded, read by the bit node units in every bit node phase.
// en selects the port, we chooses a write (wdata stored at addr) over a read (rdata holds the
// word at addr from the next cycle on). The contents are not reset; every word that is read in
// a frame has been written in that frame. Depth is one word less than the 82-word macro of the
// published chip: 81 words hold the largest sub-block.
module ldpc_rf1 #(
  parameter int DEPTH = 81,
  parameter int W     = 8,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
