// keystream_top: the three keystream generators side by side.
//
//   * asg           - K-generator: alternating step generator with
//                     key-dependent decimation (the improved design);
//   * sc1_keystream - stream cipher 1: keystream from iterated LFSR-based
//                     Toeplitz hashing;
//   * sc2           - stream cipher 2: filter generator reseeded from CRC
//                     hashes.
//
// The three share only clock and reset; each has its own key, enable,
// message and keystream ports (prefixes asg_, sc1_, sc2_). All parameters
// are at their defaults: R1/R2/R3 of 128/89/97 stages with 4 weighted
// decimation bits, a 5-bit hash of 9-bit inputs, and a 9-stage reseeded
// filter generator. Timing of each port group is described in the module of
// that generator.
module keystream_top
  import ks_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // alternating step generator
  input  logic                          asg_load,
  input  logic [ASG_L1-1:0]             asg_r1_seed,
  input  logic [ASG_L2-1:0]             asg_r2_seed,
  input  logic [ASG_L3-1:0]             asg_r3_seed,
  input  logic [ASG_W-1:0][ASG_IDXW-1:0] asg_idx1,
  input  logic [ASG_W-1:0][ASG_IDXW-1:0] asg_idx2,
  input  logic                          asg_mode_r1,
  input  logic                          asg_enable,
  input  logic                          asg_msg_bit,
  output logic                          asg_ks_valid,
  output logic                          asg_ks_bit,
  output logic                          asg_ct_bit,
  // stream cipher 1
  input  logic                          sc1_load,
  input  logic [SC1_N-1:0]              sc1_key,
  input  logic [SC1_M-SC1_N-1:0]        sc1_s_seed,
  input  logic                          sc1_cfg_load,
  input  logic [SC1_N-1:0]              sc1_cfg_poly,
  input  logic [SC1_N-1:0]              sc1_cfg_init,
  input  logic                          sc1_enable,
  input  logic [SC1_N-1:0]              sc1_pt_word,
  output logic                          sc1_ks_valid,
  output logic [SC1_N-1:0]              sc1_ks_word,
  output logic [SC1_N-1:0]              sc1_ct_word,
  // stream cipher 2
  input  logic                          sc2_load,
  input  logic [SC2_M-1:0]              sc2_key,
  input  logic                          sc2_enable,
  input  logic                          sc2_msg_bit,
  output logic                          sc2_ks_valid,
  output logic                          sc2_ks_bit,
  output logic                          sc2_ct_bit,
  output logic                          sc2_reseed,
  output logic                          sc2_rekey
);

  asg u_asg (
    .clk, .rst_n,
    .load(asg_load), .r1_seed(asg_r1_seed), .r2_seed(asg_r2_seed),
    .r3_seed(asg_r3_seed), .idx1(asg_idx1), .idx2(asg_idx2),
    .mode_r1(asg_mode_r1), .enable(asg_enable), .msg_bit(asg_msg_bit),
    .ks_valid(asg_ks_valid), .ks_bit(asg_ks_bit), .ct_bit(asg_ct_bit));

  sc1_keystream u_sc1 (
    .clk, .rst_n,
    .load(sc1_load), .key(sc1_key), .s_seed(sc1_s_seed),
    .cfg_load(sc1_cfg_load), .cfg_poly(sc1_cfg_poly), .cfg_init(sc1_cfg_init),
    .enable(sc1_enable), .pt_word(sc1_pt_word),
    .ks_valid(sc1_ks_valid), .ks_word(sc1_ks_word), .ct_word(sc1_ct_word));

  sc2 u_sc2 (
    .clk, .rst_n,
    .load(sc2_load), .key(sc2_key), .enable(sc2_enable), .msg_bit(sc2_msg_bit),
    .ks_valid(sc2_ks_valid), .ks_bit(sc2_ks_bit), .ct_bit(sc2_ct_bit),
    .reseed(sc2_reseed), .rekey(sc2_rekey));

endmodule
