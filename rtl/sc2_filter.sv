// sc2_filter: nonlinear Boolean filter of stream cipher 2.
//
// The paper specifies only "a nonlinear filter with n inputs" on the LFSR
// stages; the function is this design's choice:
//     f(x) = x0 ^ (x1 & x2) ^ (x3 & x4) ^ ... 
// a linear term plus the XOR of ANDed neighbouring pairs (a quadratic bent
// part), with a last unpaired input added linearly when the count is even.
// The linear term makes f balanced, so the keystream has no bias.
//
// Interface and timing: combinational, NF inputs, one output.
module sc2_filter #(
  parameter int unsigned NF = 9
) (
  input  logic [NF-1:0] x,
  output logic          y
);

  always_comb begin
    y = x[0];
    for (int k = 1; k + 1 < NF; k += 2)
      y ^= x[k] & x[k+1];
    if ((NF % 2) == 0) y ^= x[NF-1];
  end

endmodule
