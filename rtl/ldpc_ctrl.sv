// Frame controller and overlapped decoding scheduler.
//
// A frame passes through LOAD (the channel LLRs are written into the memory banks), DECODE,
// CHECK (syndrome of the hard decisions) and OUTPUT. The code mode and the iteration count
// are taken from cfg_mode / cfg_iter when the first LLR of a frame is accepted.
//
// DECODE is a sequence of slots of Z+2 cycles. In the first Z cycles of a slot the active units
// are given the addresses 0..Z-1 (one check node or bit node per cycle and unit); the last two
// cycles let the two-stage pipelines write back their last results. The four check node units
// (CNUs) work on one of three groups of four block rows, the eight bit node units (BNUs) on one
// of three groups of eight block columns. With the reordered matrix (row group 0 touches no
// column of group 2, row group 2 none of group 0) the slots of one decoding are
//   C0 | C1 | C2+B0 | B1 | B2+C0 | C1 | C2+B0 | B1 | B2+C0 ... | B2
// where Cg is a check node phase of row group g and Bg a bit node phase of column group g.
// Phases in one slot never touch the same sub-block. Each iteration costs four slots, plus one
// leading slot, so DECODE lasts (Z+2)*(1+4*iter) cycles, against (Z+2)*6*iter without overlap.
//
// Handshake: in_ready is high in IDLE and LOAD; ib_last (from the input buffer) marks the
// acceptance of the last LLR. synd_start/out_start are one-cycle pulses; synd_done and
// out_done end the CHECK and OUTPUT states. dec_done pulses in the last DECODE cycle.
module ldpc_ctrl
  import ldpc_pkg::mode_e, ldpc_pkg::MODE_Z81, ldpc_pkg::mode_z;
#(
  parameter int ZMAX = ldpc_pkg::ZMAX,
  parameter int AW   = $clog2(ZMAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mode_e         cfg_mode,
  input  logic [2:0]    cfg_iter,       // 1..7 (0 is taken as 1)
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          ib_last,        // last LLR of the frame accepted
  output mode_e         mode,           // mode of the current frame
  output logic [AW-1:0] z,              // sub-block size of the current frame
  // decoding schedule
  output logic          cnu_rd,         // CNU issue cycle
  output logic [1:0]    cnu_grp,        // row group of the CNUs
  output logic          bnu_rd,         // BNU issue cycle
  output logic [1:0]    bnu_grp,        // column group of the BNUs
  output logic [AW-1:0] idx,            // check index j (CNUs) and bit index k (BNUs)
  output logic          dec_done,
  // back end
  output logic          synd_start,
  input  logic          synd_done,
  output logic          out_start,
  input  logic          out_done,
  output logic          busy
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_LOADW, S_DECODE, S_CHECK, S_OUTPUT} state_e;

  state_e      state;
  mode_e       mode_q;
  logic [2:0]  iter_q;
  logic [AW:0] cnt;           // cycle within a slot, 0..Z+1
  logic [4:0]  slot;          // 0..4*iter
  logic [4:0]  last_slot;
  logic [1:0]  phase;         // (slot-1) mod 4
  logic        slot_end;

  assign mode      = (state == S_IDLE) ? cfg_mode : mode_q;
  assign z         = mode_z(mode);
  assign in_ready  = (state == S_IDLE) || (state == S_LOAD);
  assign busy      = (state != S_IDLE);
  assign last_slot = {iter_q, 2'b00};
  assign phase     = 2'(slot - 5'd1);
  assign slot_end  = (cnt == {1'b0, z} + (AW+1)'(1));
  assign idx       = cnt[AW-1:0];
  assign dec_done  = (state == S_DECODE) && slot_end && (slot == last_slot);

  // Which phases run in the current slot.
  always_comb begin
    logic c_on, b_on;
    c_on    = 1'b0;
    b_on    = 1'b0;
    cnu_grp = 2'd0;
    bnu_grp = 2'd0;
    if (slot == 5'd0) begin
      c_on = 1'b1; cnu_grp = 2'd0;
    end else begin
      case (phase)
        2'd0: begin c_on = 1'b1; cnu_grp = 2'd1; end
        2'd1: begin c_on = 1'b1; cnu_grp = 2'd2; b_on = 1'b1; bnu_grp = 2'd0; end
        2'd2: begin b_on = 1'b1; bnu_grp = 2'd1; end
        default: begin
          b_on = 1'b1; bnu_grp = 2'd2;
          c_on = (slot != last_slot); cnu_grp = 2'd0;
        end
      endcase
    end
    cnu_rd = (state == S_DECODE) && c_on && (cnt < {1'b0, z});
    bnu_rd = (state == S_DECODE) && b_on && (cnt < {1'b0, z});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      mode_q     <= MODE_Z81;
      iter_q     <= 3'd1;
      cnt        <= '0;
      slot       <= '0;
      synd_start <= 1'b0;
      out_start  <= 1'b0;
    end else begin
      synd_start <= 1'b0;
      out_start  <= 1'b0;
      case (state)
        S_IDLE: if (in_valid) begin
          mode_q <= cfg_mode;
          iter_q <= (cfg_iter == 3'd0) ? 3'd1 : cfg_iter;
          state  <= ib_last ? S_LOADW : S_LOAD;
        end
        S_LOAD:  if (ib_last) state <= S_LOADW;
        S_LOADW: begin
          state <= S_DECODE;
          cnt   <= '0;
          slot  <= '0;
        end
        S_DECODE: begin
          if (slot_end) begin
            cnt <= '0;
            if (slot == last_slot) begin
              state      <= S_CHECK;
              synd_start <= 1'b1;
            end else begin
              slot <= slot + 5'd1;
            end
          end else begin
            cnt <= cnt + (AW+1)'(1);
          end
        end
        S_CHECK: if (synd_done) begin
          state     <= S_OUTPUT;
          out_start <= 1'b1;
        end
        S_OUTPUT: if (out_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
