// asg: K-generator G_k, an alternating step generator with key-dependent
// decimation, plus the message XOR that turns it into a stream cipher.
//
// Three LFSRs R1 (L1 stages), R2 (L2) and R3 (L3). For each keystream bit t:
//   * if R1 bit 0 is 1, R2 is clocked del1 times and R3 stands still,
//   * otherwise R3 is clocked del2 times and R2 stands still,
// where del1/del2 = 1 + sum_k 2^k R1[idx1_k / idx2_k] (asg_delta). Then
//   z_t = R1[0] ^ R2[0] ^ R3[0]   (class Omega^1, mode_r1 = 1)
//   z_t =         R2[0] ^ R3[0]   (class Omega^2, mode_r1 = 0)
// is taken with R1 still at position t and R2/R3 after their clocking, and R1
// then steps once. Ciphertext is msg_bit ^ z_t.
//
// The secret key is the three initial states and the two index sets; it is
// taken when `load` is high. Register lengths follow the paper where it gives
// them (l = 128, decimation weights w < 5, 6-bit indices); R2/R3 lengths 89 and
// 97 satisfy its "m, n > 80" and are this design's choice, as are all
// feedback polynomials and the cycle timing.
//
// Timing: one bit every 1 + delta cycles (1 .. 2^W clocking cycles plus one
// decision cycle). ks_valid pulses for one cycle with ks_bit/ct_bit; ct_bit
// is combinational from ks_bit and msg_bit, so msg_bit must be presented in
// the ks_valid cycle. `enable` low holds the generator between bits.
module asg
  import ks_pkg::*;
#(
  parameter int unsigned       L1   = ASG_L1,
  parameter int unsigned       L2   = ASG_L2,
  parameter int unsigned       L3   = ASG_L3,
  parameter logic [L1-1:0]     TAPS1 = L1'(ASG_TAPS1),
  parameter logic [L2-1:0]     TAPS2 = L2'(ASG_TAPS2),
  parameter logic [L3-1:0]     TAPS3 = L3'(ASG_TAPS3),
  parameter int unsigned       W1   = ASG_W,
  parameter int unsigned       W2   = ASG_W,
  parameter int unsigned       IDXW = ASG_IDXW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // key
  input  logic                   load,
  input  logic [L1-1:0]          r1_seed,
  input  logic [L2-1:0]          r2_seed,
  input  logic [L3-1:0]          r3_seed,
  input  logic [W1-1:0][IDXW-1:0] idx1,
  input  logic [W2-1:0][IDXW-1:0] idx2,
  input  logic                   mode_r1,   // 1: Omega^1 (R1^R2^R3), 0: Omega^2
  // stream
  input  logic                   enable,
  input  logic                   msg_bit,
  output logic                   ks_valid,
  output logic                   ks_bit,
  output logic                   ct_bit
);

  localparam int unsigned DW = ((W1 > W2) ? W1 : W2) + 1;

  logic [L1-1:0] r1;
  logic [L2-1:0] r2;
  logic [L3-1:0] r3;
  logic [W1:0]   del1;
  logic [W2:0]   del2;
  logic          step_r1, step_r2, step_r3, done;
  logic [W1-1:0][IDXW-1:0] idx1_q;
  logic [W2-1:0][IDXW-1:0] idx2_q;
  logic          mode_q;
  ccg_state_e    state;

  // key registers for the decimation indices and the output class
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx1_q <= '0;
      idx2_q <= '0;
      mode_q <= 1'b1;
    end else if (load) begin
      idx1_q <= idx1;
      idx2_q <= idx2;
      mode_q <= mode_r1;
    end
  end

  lfsr #(.WIDTH(L1), .TAPS(TAPS1)) u_r1 (
    .clk, .rst_n, .load, .seed(r1_seed), .step(step_r1), .q(r1));
  lfsr #(.WIDTH(L2), .TAPS(TAPS2)) u_r2 (
    .clk, .rst_n, .load, .seed(r2_seed), .step(step_r2), .q(r2));
  lfsr #(.WIDTH(L3), .TAPS(TAPS3)) u_r3 (
    .clk, .rst_n, .load, .seed(r3_seed), .step(step_r3), .q(r3));

  asg_delta #(.L(L1), .W(W1), .IDXW(IDXW)) u_del1 (
    .r1(r1), .idx(idx1_q), .delta(del1));
  asg_delta #(.L(L1), .W(W2), .IDXW(IDXW)) u_del2 (
    .r1(r1), .idx(idx2_q), .delta(del2));

  asg_ctrl #(.DW(DW)) u_ctrl (
    .clk, .rst_n,
    .restart(load),
    .enable,
    .a0(r1[0]),
    .del1(DW'(del1)),
    .del2(DW'(del2)),
    .step_r1, .step_r2, .step_r3, .done, .state);

  // Output bits of R2/R3 as they will be after this cycle's clocking: a
  // stepped register shifts its stage 1 into stage 0.
  logic r2_out, r3_out, z;
  assign r2_out = step_r2 ? r2[1] : r2[0];
  assign r3_out = step_r3 ? r3[1] : r3[0];
  assign z      = (mode_q & r1[0]) ^ r2_out ^ r3_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ks_valid <= 1'b0;
      ks_bit   <= 1'b0;
    end else if (load) begin
      ks_valid <= 1'b0;
    end else begin
      ks_valid <= done;
      if (done) ks_bit <= z;
    end
  end

  assign ct_bit = ks_bit ^ msg_bit;

  // R2 and R3 are never clocked together (alternating step rule).
  assert property (@(posedge clk) disable iff (!rst_n) !(step_r2 && step_r3))
    else $error("asg: R2 and R3 clocked in the same cycle");

endmodule
