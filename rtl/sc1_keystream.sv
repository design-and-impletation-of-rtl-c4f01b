// sc1_keystream: stream cipher 1, a keystream generator built on the
// LFSR-based Toeplitz hash.
//
//   X_1 = HASH(KEY || S_1),  X_i = HASH((KEY ^ X_{i-1}) || S_i),
//   keystream = X_1 || X_2 || ...
//
// HASH maps m bits to n bits (toeplitz_hash). S_i is the state of an LFSR of
// degree m-n (the paper's LFSRS) that steps once per output word, so the
// hash input is the n-bit word KEY ^ X_{i-1} followed by the (m-n)-bit S_i.
// Defaults follow the paper's worked design: n = 5, m = 9, LFSRS of degree 4.
// The LFSRS polynomial (x^4 + x + 1), the bit order of the hash input (most
// significant bit of {KEY ^ X, S} first) and the cycle timing are this
// design's choices.
//
// Interface and timing: `load` takes the key and the LFSRS seed and restarts
// the sequence at X_1. While `enable` is high the unit produces one n-bit word
// every m+2 cycles (one cycle to prepare the hash input, m cycles to absorb
// it, one to take the result): ks_valid pulses with ks_word, and ct_word =
// pt_word ^ ks_word in that cycle. Lowering `enable` pauses between words.
module sc1_keystream
  import ks_pkg::*;
#(
  parameter int unsigned     N     = SC1_N,
  parameter int unsigned     M     = SC1_M,
  parameter logic [N-1:0]    HPOLY = N'(SC1_HPOLY),
  parameter logic [N-1:0]    HINIT = N'(SC1_HINIT),
  parameter logic [M-N-1:0]  SPOLY = (M-N)'(SC1_SPOLY)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [N-1:0]    key,
  input  logic [M-N-1:0]  s_seed,
  input  logic            cfg_load,
  input  logic [N-1:0]    cfg_poly,
  input  logic [N-1:0]    cfg_init,
  input  logic            enable,
  input  logic [N-1:0]    pt_word,
  output logic            ks_valid,
  output logic [N-1:0]    ks_word,
  output logic [N-1:0]    ct_word
);

  typedef enum logic [1:0] {PREP, ABSORB, TAKE} sc1_state_e;

  sc1_state_e        state;
  logic [N-1:0]      key_q, x_prev;
  logic [M-1:0]      msg_sr;
  logic [$clog2(M+1)-1:0] cnt;
  logic [M-N-1:0]    s;
  logic [N-1:0]      hash;
  logic              start, bit_valid, s_step;

  assign start     = (state == PREP) && enable && !load;
  assign bit_valid = (state == ABSORB);
  assign s_step    = (state == TAKE);

  lfsr #(.WIDTH(M-N), .TAPS(SPOLY)) u_lfsrs (
    .clk, .rst_n, .load, .seed(s_seed), .step(s_step), .q(s));

  toeplitz_hash #(.N(N), .POLY(HPOLY), .INIT(HINIT)) u_hash (
    .clk, .rst_n, .cfg_load, .cfg_poly, .cfg_init,
    .start, .bit_valid, .bit_in(msg_sr[M-1]), .hash);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= PREP;
      key_q    <= '0;
      x_prev   <= '0;
      msg_sr   <= '0;
      cnt      <= '0;
      ks_valid <= 1'b0;
      ks_word  <= '0;
    end else if (load) begin
      state    <= PREP;
      key_q    <= key;
      x_prev   <= '0;       // so that the first hash input is KEY || S_1
      ks_valid <= 1'b0;
    end else begin
      ks_valid <= 1'b0;
      unique case (state)
        PREP: if (enable) begin
          msg_sr <= {key_q ^ x_prev, s};
          cnt    <= ($clog2(M+1))'(M);
          state  <= ABSORB;
        end
        ABSORB: begin
          msg_sr <= msg_sr << 1;
          cnt    <= cnt - 1'b1;
          if (cnt == 1) state <= TAKE;
        end
        TAKE: begin
          x_prev   <= hash;
          ks_word  <= hash;
          ks_valid <= 1'b1;
          state    <= PREP;
        end
        default: state <= PREP;
      endcase
    end
  end

  assign ct_word = pt_word ^ ks_word;

  initial assert (M > N + 1) else $error("sc1_keystream: need m - n >= 2");

endmodule
