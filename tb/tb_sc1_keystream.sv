// tb_sc1_keystream: self-checking test of stream cipher 1 at its default
// size (5-bit hash of 9-bit inputs, 4-bit state register).
//
// The reference model iterates X_i = HASH((KEY ^ X_{i-1}) || S_i) with the
// hash computed as an explicit Toeplitz matrix product (sequence of
// h(x) = x^5 + x^2 + 1 from (A0..A4) = (0 0 0 1 1)) and S stepping by
// s(k+4) = s(k+1) ^ s(k). Every keystream and ciphertext word is compared,
// the word spacing must be m + 2 = 11 cycles, and a key reload must restart
// the sequence at X_1. The period of the word sequence is measured and
// printed for reference.
module tb_sc1_keystream;
  localparam int N = 5, M = 9;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic load, cfg_load, enable, ks_valid;
  logic [N-1:0] key, cfg_poly, cfg_init, pt_word, ks_word, ct_word;
  logic [M-N-1:0] s_seed;

  sc1_keystream dut (.clk, .rst_n, .load, .key, .s_seed, .cfg_load, .cfg_poly,
                     .cfg_init, .enable, .pt_word, .ks_valid, .ks_word, .ct_word);

  logic [N-1:0] mkey, mx;
  logic [M-N-1:0] ms;

  function automatic logic [N-1:0] ref_hash(logic [M-1:0] msg);
    bit a[0:M+N];
    logic [N-1:0] h = '0;
    logic [4:0] init = 5'b11000;
    for (int i = 0; i < 5; i++) a[i] = init[i];
    for (int k = 0; k + 5 <= M + N; k++) a[k+5] = a[k+2] ^ a[k];
    for (int j = 0; j < M; j++)            // message bit j is msg[M-1-j]
      if (msg[M-1-j]) for (int i = 0; i < N; i++) h[i] ^= a[j+i];
    return h;
  endfunction

  function automatic logic [N-1:0] model_word();
    logic [N-1:0] x;
    x  = ref_hash({mkey ^ mx, ms});
    mx = x;
    ms = {ms[0] ^ ms[1], ms[3:1]};
    return x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_load(input logic [N-1:0] k, input logic [M-N-1:0] s);
    key = k; s_seed = s; load = 1;
    @(negedge clk); load = 0;
    mkey = k; ms = s; mx = '0;
  endtask

  task automatic run_words(input int nw);
    int gap;
    logic [N-1:0] w;
    for (int i = 0; i < nw; i++) begin
      w = model_word();
      gap = 0;
      do begin
        pt_word = N'($urandom);
        @(negedge clk);
        gap++;
      end while (!ks_valid && gap < 50);
      check(ks_word == w, $sformatf("word %0d: got %b expected %b", i, ks_word, w));
      check(ct_word == (w ^ pt_word), "ciphertext word");
      if (i > 0) check(gap == M + 2, $sformatf("word spacing %0d cycles", gap));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; cfg_load = 0; enable = 0; key = '0; s_seed = '0;
    cfg_poly = '0; cfg_init = '0; pt_word = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    do_load(5'b10110, 4'b1001);
    enable = 1;
    run_words(600);
    // stall between words
    enable = 0; repeat (20) @(negedge clk);
    check(!ks_valid, "no words while disabled");
    enable = 1;
    run_words(50);
    // reload restarts at X_1
    do_load(5'b01101, 4'b0011);
    run_words(500);
    // period of the word sequence for this key, from the model alone
    begin
      logic [N-1:0] x0; logic [M-N-1:0] s0; int p;
      mkey = 5'b10110; mx = '0; ms = 4'b1001;
      for (int i = 0; i < 1000; i++) void'(model_word());   // reach the cycle
      x0 = mx; s0 = ms; p = 0;
      do begin void'(model_word()); p++; end while (!(mx == x0 && ms == s0) && p < 100000);
      $display("sc1 keystream period for this key: %0d words (%0d bits)", p, p * N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
