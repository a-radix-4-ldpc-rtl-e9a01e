// Two-input check node operation (the "first operation unit" of the check node update).
//
// Computes the min-sum approximation with correction terms of the exact two-input check update
//   out = sign(a) sign(b) min(|a|,|b|) + f(|a+b|) - f(|a-b|),   f(x) = log(1+e^-x)
// where f is the piece-wise linear table of ldpc_lut. The sign product is the XOR of the two
// sign bits; the magnitudes come from the two's complement inputs. The result is clipped to the
// message width. Inputs and output are signed with 4 fraction bits. Purely combinational.
module ldpc_cnu_op2
#(
  parameter int W = ldpc_pkg::W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);
  logic              sgn;
  logic [W:0]        mag_a, mag_b, mag_min;
  logic signed [W:0] sum, dif;
  logic [W:0]        abs_sum, abs_dif;
  logic [3:0]        f_sum, f_dif;
  logic signed [W+2:0] res;

  ldpc_lut #(.IW(W+1)) u_lut_sum (.x(abs_sum), .y(f_sum));
  ldpc_lut #(.IW(W+1)) u_lut_dif (.x(abs_dif), .y(f_dif));

  always_comb begin
    sgn     = a[W-1] ^ b[W-1];
    mag_a   = a[W-1] ? (W+1)'(-(W+1)'(a)) : (W+1)'(a);
    mag_b   = b[W-1] ? (W+1)'(-(W+1)'(b)) : (W+1)'(b);
    mag_min = (mag_a < mag_b) ? mag_a : mag_b;
    sum     = (W+1)'(a) + (W+1)'(b);
    dif     = (W+1)'(a) - (W+1)'(b);
    abs_sum = sum[W] ? (W+1)'(-sum) : (W+1)'(sum);
    abs_dif = dif[W] ? (W+1)'(-dif) : (W+1)'(dif);
    res     = (sgn ? -$signed({2'b00, mag_min}) : $signed({2'b00, mag_min}))
              + $signed((W+3)'(f_sum)) - $signed((W+3)'(f_dif));
    if (res > (W+3)'(2**(W-1) - 1))   y = W'(2**(W-1) - 1);
    else if (res < -(W+3)'(2**(W-1))) y = W'(-(2**(W-1)));
    else                              y = res[W-1:0];
  end
endmodule
