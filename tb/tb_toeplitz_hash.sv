// tb_toeplitz_hash: self-checking test of the LFSR-based Toeplitz hash.
//
// The reference builds the n x m Toeplitz matrix explicitly: column j holds
// sequence bits a(j) .. a(j+n-1) of the LFSR recurrence, written out here
// (a(k+5) = a(k+2) ^ a(k) for h(x) = x^5 + x^2 + 1, and a(k+5) = a(k+3) ^ a(k)
// after the control register is reloaded with x^5 + x^3 + 1), and the hash
// is the matrix-vector product over GF(2). Random 9-bit messages and random
// messages of other lengths are hashed; gaps between bits must not matter.
module tb_toeplitz_hash;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic cfg_load, start, bit_valid, bit_in;
  logic [4:0] cfg_poly, cfg_init, hash;

  toeplitz_hash dut (.clk, .rst_n, .cfg_load, .cfg_poly, .cfg_init, .start,
                     .bit_valid, .bit_in, .hash);

  bit alt_poly;
  logic [4:0] init_now;

  function automatic logic [4:0] ref_hash(logic [4:0] init, bit alt, bit msg[], int len);
    bit a[0:63];
    logic [4:0] h = '0;
    for (int i = 0; i < 5; i++) a[i] = init[i];
    for (int k = 0; k + 5 < 64; k++) a[k+5] = alt ? (a[k+3] ^ a[k]) : (a[k+2] ^ a[k]);
    for (int j = 0; j < len; j++)
      if (msg[j]) for (int i = 0; i < 5; i++) h[i] ^= a[j+i];
    return h;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hash_msg(input int len, input bit gaps);
    bit msg[];
    logic [4:0] exp_h;
    msg = new[len];
    foreach (msg[j]) msg[j] = 1'($urandom);
    start = 1; @(negedge clk); start = 0;
    for (int j = 0; j < len; j++) begin
      if (gaps && $urandom % 3 == 0) begin
        bit_valid = 0; bit_in = 1; @(negedge clk);
      end
      bit_valid = 1; bit_in = msg[j];
      @(negedge clk);
    end
    bit_valid = 0; bit_in = 0;
    exp_h = ref_hash(init_now, alt_poly, msg, len);
    check(hash == exp_h, $sformatf("hash of %0d bits: got %b expected %b", len, hash, exp_h));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_load = 0; start = 0; bit_valid = 0; bit_in = 0; cfg_poly = '0; cfg_init = '0;
    alt_poly = 0; init_now = 5'b11000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // all-zero message gives a zero hash; a single 1 at position j gives column j
    for (int j = 0; j < 9; j++) begin
      bit msg[];
      logic [4:0] exp_h;
      msg = new[9];
      foreach (msg[i]) msg[i] = (i == j);
      start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < 9; i++) begin bit_valid = 1; bit_in = msg[i]; @(negedge clk); end
      bit_valid = 0;
      exp_h = ref_hash(init_now, 0, msg, 9);
      check(hash == exp_h, $sformatf("unit message %0d: got %b expected %b", j, hash, exp_h));
    end
    for (int n = 0; n < 300; n++) hash_msg(9, n % 2);
    for (int n = 0; n < 100; n++) hash_msg(1 + $urandom % 40, 1);
    // new polynomial and initial state through the control register
    cfg_poly = 5'b01001; cfg_init = 5'b10110; cfg_load = 1;
    @(negedge clk); cfg_load = 0;
    alt_poly = 1; init_now = 5'b10110;
    for (int n = 0; n < 300; n++) hash_msg(9, n % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
