// sc1_period_probe: helper for tb_sc1_table1. Runs one stream cipher 1
// instance of the given size (hash LFSR started at HINITP) for NKEYS keys (key values 0 .. NKEYS-1, state
// register seeded with 1), records each keystream, and measures the period
// of the word sequence. It reports the longest period in bits, how many keys
// reached n(2^n-1)(2^(m-n)-1) bits, and how many periods broke the rules
// every period must obey: a multiple of the state-register period
// (2^(m-n)-1 words) and at most 2^n (2^(m-n)-1) words (the number of states).
module sc1_period_probe #(
  parameter int unsigned    N     = 5,
  parameter int unsigned    M     = 9,
  parameter logic [N-1:0]   HPOLY = '0,
  parameter logic [M-N-1:0] SPOLY = '0,
  parameter int unsigned    NKEYS = 16,
  parameter logic [N-1:0]   HINITP = '1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   max_bits,
  output int   n_formula,
  output int   n_bad
);
  localparam int unsigned SPER    = (1 << (M - N)) - 1;
  localparam int unsigned FORMULA = N * ((1 << N) - 1) * SPER;
  localparam int unsigned BOUND   = (1 << N) * SPER;        // words
  localparam int unsigned NW      = 3 * BOUND;

  logic load, enable, ks_valid;
  logic [N-1:0] key, ks_word, ct_word;
  logic [N-1:0] words [NW];

  sc1_keystream #(.N(N), .M(M), .HPOLY(HPOLY), .HINIT(HINITP), .SPOLY(SPOLY)) dut (
    .clk, .rst_n, .load, .key, .s_seed((M-N)'(1)), .cfg_load(1'b0),
    .cfg_poly('0), .cfg_init('0), .enable, .pt_word('0), .ks_valid, .ks_word, .ct_word);

  initial begin
    int nw, p;
    bit same;
    done = 0; max_bits = 0; n_formula = 0; n_bad = 0;
    load = 0; enable = 0; key = '0;
    @(posedge rst_n);
    for (int k = 0; k < NKEYS; k++) begin
      key = N'(k);
      @(negedge clk); load = 1; @(negedge clk); load = 0; enable = 1;
      nw = 0;
      while (nw < NW) begin
        @(negedge clk);
        if (ks_valid) begin words[nw] = ks_word; nw++; end
      end
      enable = 0;
      p = 0;
      for (int lag = 1; lag <= BOUND && p == 0; lag++) begin
        same = 1;
        for (int i = NW / 2; i + lag < NW && same; i++) if (words[i] != words[i + lag]) same = 0;
        if (same) p = lag;
      end
      if (p == 0 || (p % SPER) != 0) n_bad++;
      if (p * N > max_bits) max_bits = p * N;
      if (p * N == FORMULA) n_formula++;
    end
    done = 1;
  end
endmodule
