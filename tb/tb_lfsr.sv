// tb_lfsr: self-checking test of lfsr.
//
// A 5-stage instance with x^5 + x^2 + 1 must step through all 31 nonzero
// states and return to its seed after exactly 31 steps, emitting the bit
// sequence of the recurrence a(k+5) = a(k+2) ^ a(k). A 128-stage instance
// with the default taps is compared bit by bit with the recurrence
// a(k+128) = a(k+126) ^ a(k+101) ^ a(k+99) ^ a(k), written out separately
// here. Load priority and hold (step low) are checked too.
module tb_lfsr;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        s_load, s_step, b_load, b_step;
  logic [4:0]  s_seed, s_q;
  logic [127:0] b_seed, b_q;

  lfsr #(.WIDTH(5), .TAPS(5'b00101)) dut_s (
    .clk, .rst_n, .load(s_load), .seed(s_seed), .step(s_step), .q(s_q));
  lfsr dut_b (
    .clk, .rst_n, .load(b_load), .seed(b_seed), .step(b_step), .q(b_q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seq[0:199];
  bit big[0:1000];
  logic [4:0] seen;

  initial begin
    s_load = 0; s_step = 0; b_load = 0; b_step = 0; s_seed = '0; b_seed = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(s_q == 5'h1f && b_q == '1, "reset state is all ones");

    // --- small register: full period ---
    s_seed = 5'b11000; s_load = 1;
    @(negedge clk); s_load = 0;
    check(s_q == 5'b11000, "seed loaded");
    for (int i = 0; i < 5; i++) seq[i] = s_seed[i];
    for (int i = 5; i < 200; i++) seq[i] = seq[i-3] ^ seq[i-5];
    for (int k = 1; k <= 31; k++) begin
      check(s_q[0] == seq[k-1], $sformatf("small output bit %0d", k-1));
      s_step = 1; @(negedge clk); s_step = 0;
      if (k < 31) check(s_q != 5'b11000, $sformatf("no early repeat at %0d", k));
    end
    check(s_q == 5'b11000, "period is 31");
    // hold
    @(negedge clk); @(negedge clk);
    check(s_q == 5'b11000, "holds without step");
    // load has priority over step
    s_seed = 5'b00001; s_load = 1; s_step = 1;
    @(negedge clk); s_load = 0; s_step = 0;
    check(s_q == 5'b00001, "load beats step");

    // --- 128-stage register against its recurrence ---
    for (int i = 0; i < 128; i++) b_seed[i] = 1'($urandom);
    b_seed[0] = 1'b1;
    b_load = 1; @(negedge clk); b_load = 0;
    for (int i = 0; i < 128; i++) big[i] = b_seed[i];
    for (int i = 128; i <= 1000; i++) big[i] = big[i-2] ^ big[i-27] ^ big[i-29] ^ big[i-128];
    b_step = 1;
    for (int k = 0; k < 800; k++) begin
      check(b_q[0] == big[k], $sformatf("big output bit %0d", k));
      check(b_q[127] == big[k+127], $sformatf("big top stage %0d", k));
      @(negedge clk);
    end
    b_step = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
