// Bit node update unit with 12 inputs, one bit node per clock cycle.
//
// Input i carries the check-to-bit message from block row i; inputs whose block is zero in
// the current column are masked to 0, so the same unit serves the column degrees 2, 3, 4, 11
// and 12 of the three codes. Stage 1 adds the channel LLR and all masked inputs into the
// a-posteriori value P and registers it together with the inputs. Stage 2 subtracts each input
// from P and clips the difference to the message width, giving the bit-to-check messages
// q[i] = clip(P - r[i]); the sign bit of P is the hard decision (1 when P < 0). Outputs are
// combinational from the stage register: one cycle after the inputs. Signed Q4.4 messages;
// P is kept at full precision (W+4 bits).
module ldpc_bnu
#(
  parameter int W   = ldpc_pkg::W,
  parameter int NIN = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] ch,            // channel LLR of the bit
  input  logic [NIN-1:0]      mask,          // 1: input i is a real edge
  input  logic signed [W-1:0] r   [NIN],     // check-to-bit messages
  output logic                out_valid,
  output logic signed [W-1:0] q   [NIN],     // bit-to-check messages
  output logic                hard           // hard decision of the bit
);
  localparam int PW = W + $clog2(NIN + 1);
  typedef logic signed [PW-1:0] sum_t;

  sum_t                p_d, p_q;
  logic signed [W-1:0] r_q [NIN];

  always_comb begin
    p_d = sum_t'(ch);
    for (int i = 0; i < NIN; i++)
      if (mask[i]) p_d += sum_t'(r[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_q       <= '0;
      for (int i = 0; i < NIN; i++) r_q[i] <= '0;
    end else begin
      out_valid <= in_valid;
      p_q       <= p_d;
      for (int i = 0; i < NIN; i++) r_q[i] <= mask[i] ? r[i] : '0;
    end
  end

  always_comb begin
    hard = p_q[PW-1];
    for (int i = 0; i < NIN; i++) begin
      sum_t d;
      d = p_q - sum_t'(r_q[i]);
      if (d > sum_t'(2**(W-1) - 1))   q[i] = W'(2**(W-1) - 1);
      else if (d < -sum_t'(2**(W-1))) q[i] = W'(-(2**(W-1)));
      else                            q[i] = d[W-1:0];
    end
  end
endmodule
