// Three-input Radix-4 check node operation (the "second operation unit").
//
// The exact update of a check node with four bit nodes, seen from one of them, is
//   out = log(e^(a+b+c) + e^a + e^b + e^c) - log(e^(a+b) + e^(b+c) + e^(a+c) + 1).
// Each four-term log-sum-exp is approximated by its largest term plus a correction from the
// largest and second largest term:
//   log(sum e^t) ~ max(t) + f(max(t) - max2(t)),   f(x) = log(1+e^-x)
// so the unit forms the two 4-element sets alpha = (a+b+c, a, b, c) and beta = (a+b, b+c, a+c, 0),
// finds the largest and second largest element of each in a comparison block, looks up the two
// corrections in ldpc_lut and outputs max(alpha) + f_alpha - max(beta) - f_beta, clipped to
// the message width. One such unit combines three messages in one step, where two-input units
// would need two. Inputs and output are signed with 4 fraction bits. Purely combinational.
module ldpc_cnu_op3
#(
  parameter int W = ldpc_pkg::W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] c,
  output logic signed [W-1:0] y
);
  localparam int XW = W + 3;   // wide enough for a+b+c and all differences of the sets
  typedef logic signed [XW-1:0] wide_t;

  wide_t alpha [4];
  wide_t beta  [4];
  wide_t max_a, max2_a, max_b, max2_b, res;
  logic [W:0] d_a, d_b;
  logic [3:0] f_a, f_b;

  // Largest and second largest element of a 4-element set.
  function automatic void top2(input wide_t v [4], output wide_t m1, output wide_t m2);
    m1 = v[0];
    m2 = {1'b1, {(XW-1){1'b0}}};
    for (int i = 1; i < 4; i++) begin
      if (v[i] > m1) begin
        m2 = m1;
        m1 = v[i];
      end else if (v[i] > m2) begin
        m2 = v[i];
      end
    end
  endfunction

  // Saturate a non-negative difference to the table input width.
  function automatic logic [W:0] sat_diff(input wide_t d);
    if (d > wide_t'(2**(W+1) - 1)) return {(W+1){1'b1}};
    else                           return d[W:0];
  endfunction

  ldpc_lut #(.IW(W+1)) u_lut_a (.x(d_a), .y(f_a));
  ldpc_lut #(.IW(W+1)) u_lut_b (.x(d_b), .y(f_b));

  always_comb begin
    alpha[0] = wide_t'(a) + wide_t'(b) + wide_t'(c);
    alpha[1] = wide_t'(a);
    alpha[2] = wide_t'(b);
    alpha[3] = wide_t'(c);
    beta[0]  = wide_t'(a) + wide_t'(b);
    beta[1]  = wide_t'(b) + wide_t'(c);
    beta[2]  = wide_t'(a) + wide_t'(c);
    beta[3]  = '0;
    top2(alpha, max_a, max2_a);
    top2(beta,  max_b, max2_b);
    d_a = sat_diff(max_a - max2_a);
    d_b = sat_diff(max_b - max2_b);
    res = max_a + wide_t'({1'b0, f_a}) - max_b - wide_t'({1'b0, f_b});
    if (res > wide_t'(2**(W-1) - 1))   y = W'(2**(W-1) - 1);
    else if (res < -wide_t'(2**(W-1))) y = W'(-(2**(W-1)));
    else                               y = res[W-1:0];
  end
endmodule
