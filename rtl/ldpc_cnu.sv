// Check node update unit for one check node of degree 7 or 8 per clock cycle.
//
// The rate-1/2 802.11n matrices only have rows with 7 or 8 nonzero sub-blocks, so the unit has
// eight message inputs q[0..7] and a degree select; with deg8 low input 7 is ignored and
// output 7 is meaningless. For every edge e the unit forms the extrinsic check-to-bit message
// from the other edges with a two-stage tree:
//   stage 1: two Radix-4 units combine the first three and the next three of the other inputs;
//   stage 2: degree 8: a Radix-4 unit combines those two results with the seventh other input;
//            degree 7: a two-input unit combines the two results.
// So both row degrees take two stages of operation units. A register between the stages keeps
// the clock period short; r[] is combinational from that register, so a result appears one
// cycle after its inputs (two cycles after the memory address when the inputs come from a
// register file with a registered read). The degree select and the valid bit travel with the
// data through the stage register. Inputs and outputs are signed Q4.4.
module ldpc_cnu
#(
  parameter int W = ldpc_pkg::W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                deg8,          // 1: row degree 8, 0: row degree 7
  input  logic signed [W-1:0] q   [8],       // bit-to-check messages of the row's edges
  output logic                out_valid,
  output logic signed [W-1:0] r   [8]        // check-to-bit messages, same edge order
);
  logic signed [W-1:0] s1_x [8];
  logic signed [W-1:0] s1_y [8];
  logic signed [W-1:0] s1_z [8];
  logic signed [W-1:0] x_q  [8];
  logic signed [W-1:0] y_q  [8];
  logic signed [W-1:0] z_q  [8];
  logic signed [W-1:0] r3   [8];
  logic signed [W-1:0] r2   [8];
  logic                deg8_q;

  // Index of the k-th input other than e (k = 0..6).
  function automatic int other(input int e, input int k);
    return (k < e) ? k : k + 1;
  endfunction

  for (genvar e = 0; e < 8; e++) begin : g_edge
    ldpc_cnu_op3 #(.W(W)) u_s1a (.a(q[other(e,0)]), .b(q[other(e,1)]), .c(q[other(e,2)]), .y(s1_x[e]));
    ldpc_cnu_op3 #(.W(W)) u_s1b (.a(q[other(e,3)]), .b(q[other(e,4)]), .c(q[other(e,5)]), .y(s1_y[e]));
    assign s1_z[e] = q[other(e,6)];

    ldpc_cnu_op3 #(.W(W)) u_s2r4 (.a(x_q[e]), .b(y_q[e]), .c(z_q[e]), .y(r3[e]));
    ldpc_cnu_op2 #(.W(W)) u_s2r2 (.a(x_q[e]), .b(y_q[e]), .y(r2[e]));

    always_comb r[e] = deg8_q ? r3[e] : r2[e];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      deg8_q    <= 1'b0;
      for (int e = 0; e < 8; e++) begin
        x_q[e] <= '0;
        y_q[e] <= '0;
        z_q[e] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      deg8_q    <= deg8;
      x_q       <= s1_x;
      y_q       <= s1_y;
      z_q       <= s1_z;
    end
  end
endmodule
