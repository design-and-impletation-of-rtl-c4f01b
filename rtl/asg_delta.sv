// asg_delta: decimation function of the alternating step generator.
//
// For one keystream bit, the register chosen by R1 is clocked
//     delta = 1 + 2^0*R1[idx0] + 2^1*R1[idx1] + ... + 2^(W-1)*R1[idx(W-1)]
// times, where the stage indices idx_k are part of the secret key. As in the
// paper's delta circuit, each index drives a 6-to-64 decoder; the one-hot
// decoder output is ANDed with the low 64 stages of R1 and reduced to the
// selected bit; the bit is weighted by a left shift of k and all weighted bits
// and the constant 1 are summed. The result lies in 1 .. 2^W.
//
// Interface and timing: purely combinational. R1 stages above 2^IDXW-1 cannot
// be selected (the paper's decoder has 64 outputs). Whether delta is used as
// del1 or del2 is decided by the caller from R1 bit 0; the paper's gating of
// del1 by R1[0] and del2 by its complement is done in asg_ctrl.
module asg_delta #(
  parameter int unsigned L    = 128,
  parameter int unsigned W    = 4,
  parameter int unsigned IDXW = 6
) (
  input  logic [L-1:0]              r1,
  input  logic [W-1:0][IDXW-1:0]    idx,
  output logic [W:0]                delta
);

  localparam int unsigned NDEC = (L < (1 << IDXW)) ? L : (1 << IDXW);

  logic [W-1:0][NDEC-1:0] onehot;   // decoder outputs
  logic [W-1:0]           sel;      // selected R1 bit for each weight

  always_comb begin
    for (int k = 0; k < W; k++) begin
      onehot[k] = '0;
      for (int j = 0; j < NDEC; j++)
        onehot[k][j] = (idx[k] == IDXW'(j));
      sel[k] = |(onehot[k] & r1[NDEC-1:0]);
    end
  end

  always_comb begin
    delta = (W+1)'(1);
    for (int k = 0; k < W; k++)
      delta = delta + ((W+1)'(sel[k]) << k);
  end

endmodule
