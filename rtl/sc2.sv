// sc2: stream cipher 2, a filter generator with CRC-based reseeding.
//
// An m-stage LFSR with feedback polynomial Q(x) steps every cycle and a
// nonlinear filter of its stages gives one keystream bit per cycle. The bits
// leaving the LFSR are fed to two division (CRC) circuits, G1 and G2. Every
// 2^m - 1 cycles (one LFSR period) the control signal replaces the LFSR
// state with a new seed built from the two remainders, and the dividers are
// cleared. After 2^n - 1 such intervals, i.e. every (2^m-1)(2^n-1) cycles,
// the LFSR is reloaded with the initial key, so that is the keystream period.
//
// Defaults follow the paper's example: Q(x) = x^9 + x^4 + 1,
// G1(x) = x^6 + x^5 + x^4 + x^3 + 1, G2(x) = x^2 + x + 1, and n = m = 9
// (its filter-generator period (2^9-1)^2 = 261121 for this Q). The filter
// function, the seed layout {ones, rem_G1, rem_G2} (the ones padding keeps
// the seed nonzero, since 6 + 2 < 9) and the cycle timing are this design's
// choices.
//
// Interface and timing: `load` takes the key (a nonzero m-bit LFSR state) and
// restarts all counters. Each cycle with `enable` high produces a bit:
// ks_valid/ks_bit are registered and appear the next cycle; ct_bit =
// msg_bit ^ ks_bit in that cycle. In the last cycle of an interval the LFSR
// is loaded instead of stepped; `reseed` or `rekey` pulses (registered, with
// the corresponding keystream bit) mark those loads.
module sc2
  import ks_pkg::*;
#(
  parameter int unsigned   M      = SC2_M,
  parameter int unsigned   N      = SC2_N,
  parameter logic [M-1:0]  QPOLY  = M'(SC2_QPOLY),
  parameter int unsigned   D1     = SC2_D1,
  parameter logic [D1-1:0] G1POLY = D1'(SC2_G1POLY),
  parameter int unsigned   D2     = SC2_D2,
  parameter logic [D2-1:0] G2POLY = D2'(SC2_G2POLY),
  parameter int unsigned   NF     = SC2_M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [M-1:0]  key,
  input  logic          enable,
  input  logic          msg_bit,
  output logic          ks_valid,
  output logic          ks_bit,
  output logic          ct_bit,
  output logic          reseed,
  output logic          rekey
);

  localparam logic [M-1:0] LAST_CYCLE  = M'((1 << M) - 2);
  localparam logic [N-1:0] LAST_RESEED = N'((1 << N) - 2);

  logic [M-1:0]  key_q;
  logic [M-1:0]  q;
  logic [M-1:0]  cyc;        // position within the current interval
  logic [N-1:0]  rcnt;       // intervals since the key was (re)loaded
  logic [D1-1:0] rem1;
  logic [D2-1:0] rem2;
  logic [M-1:0]  new_seed;
  logic          ctrl, do_reseed, do_rekey;
  logic          lfsr_load, lfsr_step;
  logic [M-1:0]  lfsr_seed;
  logic          f;

  // Control signal "for every 2^m - 1" cycles.
  assign ctrl      = enable && (cyc == LAST_CYCLE);
  assign do_rekey  = ctrl && (rcnt == LAST_RESEED);
  assign do_reseed = ctrl && !do_rekey;

  assign new_seed  = {{(M-D1-D2){1'b1}}, rem1, rem2};
  assign lfsr_load = load || ctrl;
  assign lfsr_seed = load ? key : (do_rekey ? key_q : new_seed);
  assign lfsr_step = enable;

  lfsr #(.WIDTH(M), .TAPS(QPOLY)) u_lfsr (
    .clk, .rst_n, .load(lfsr_load), .seed(lfsr_seed), .step(lfsr_step), .q(q));

  crc_div #(.D(D1), .POLY(G1POLY)) u_div1 (
    .clk, .rst_n, .clear(lfsr_load), .shift(enable), .bit_in(q[0]), .rem(rem1));
  crc_div #(.D(D2), .POLY(G2POLY)) u_div2 (
    .clk, .rst_n, .clear(lfsr_load), .shift(enable), .bit_in(q[0]), .rem(rem2));

  sc2_filter #(.NF(NF)) u_filter (.x(q[NF-1:0]), .y(f));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q    <= '1;
      cyc      <= '0;
      rcnt     <= '0;
      ks_valid <= 1'b0;
      ks_bit   <= 1'b0;
      reseed   <= 1'b0;
      rekey    <= 1'b0;
    end else if (load) begin
      key_q    <= key;
      cyc      <= '0;
      rcnt     <= '0;
      ks_valid <= 1'b0;
      reseed   <= 1'b0;
      rekey    <= 1'b0;
    end else begin
      ks_valid <= enable;
      reseed   <= do_reseed;
      rekey    <= do_rekey;
      if (enable) begin
        ks_bit <= f;
        if (ctrl) begin
          cyc  <= '0;
          rcnt <= do_rekey ? '0 : rcnt + 1'b1;
        end else begin
          cyc  <= cyc + 1'b1;
        end
      end
    end
  end

  assign ct_bit = ks_bit ^ msg_bit;

  initial begin
    assert (D1 + D2 < M) else $error("sc2: seed needs at least one padding bit");
    assert (NF <= M)     else $error("sc2: filter has more inputs than stages");
    assert (N >= 2)      else $error("sc2: N must be at least 2");
  end

endmodule
