// Correction term log(1 + exp(-|x|)) of the check node update, as a piece-wise linear function.
//
// The input is a non-negative magnitude in the message format (4 fraction bits, so 16 = 1.0);
// the output has the same scale. Each segment is a constant minus the input shifted right, so
// the circuit needs only comparators, shifters and one small subtractor:
//
//   [0.0, 0.5)  0.6875 - x/2        [2.0, 3.0)  0.25  - x/16
//   [0.5, 1.5)  0.5625 - x/4        [3.0, 4.5)  0.125 - x/32
//   [1.5, 2.0)  0.375  - x/8        [4.5, inf)  0
//
// The breakpoints and slopes follow the published hardware-friendly table; the offset of the
// second segment is 0.5625 (9/16), the nearest value with 4 fraction bits, which also keeps the
// function continuous at 0.5. Shifted inputs are truncated. Purely combinational.
module ldpc_lut #(
  parameter int IW = 10          // input width, unsigned, 4 fraction bits
) (
  input  logic [IW-1:0] x,       // |x| in units of 1/16
  output logic [3:0]    y        // log(1+e^-|x|) in units of 1/16, 0..11
);
  always_comb begin
    if (x < IW'(8))       y = 4'(11 - 32'(x >> 1));
    else if (x < IW'(24)) y = 4'(9  - 32'(x >> 2));
    else if (x < IW'(32)) y = 4'(6  - 32'(x >> 3));
    else if (x < IW'(48)) y = 4'(4  - 32'(x >> 4));
    else if (x < IW'(72)) y = 4'(2  - 32'(x >> 5));
    else                  y = 4'd0;
  end
endmodule
