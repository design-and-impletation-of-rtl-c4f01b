// tb_asg: self-checking test of the alternating step generator at its
// default size (R1/R2/R3 of 128/89/97 stages, 4 decimation weights).
//
// A reference model in this file keeps the three registers as bit vectors
// with their recurrences written out, applies the K-generator rule (R1 bit 0
// chooses R2 or R3, which is clocked 1 + sum 2^k R1[idx_k] times), and forms
// z = R1[0]^R2[0]^R3[0] (class 1) or R2[0]^R3[0] (class 2). Every keystream
// and ciphertext bit is compared, and so is the spacing of ks_valid pulses,
// which must be 1 + delta cycles. Both output classes, a mid-stream key
// reload and an enable stall are covered.
module tb_asg;
  import ks_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int n_r2 = 0, n_r3 = 0, n_stall = 0;
  int dmin = 99, dmax = 0;

  always #5 clk = ~clk;

  logic load, mode_r1, enable, msg_bit, ks_valid, ks_bit, ct_bit;
  logic [127:0] r1_seed;
  logic [88:0]  r2_seed;
  logic [96:0]  r3_seed;
  logic [3:0][5:0] idx1, idx2;

  asg dut (.clk, .rst_n, .load, .r1_seed, .r2_seed, .r3_seed, .idx1, .idx2,
           .mode_r1, .enable, .msg_bit, .ks_valid, .ks_bit, .ct_bit);

  // reference state
  logic [127:0] m1;
  logic [88:0]  m2;
  logic [96:0]  m3;
  logic [3:0][5:0] mi1, mi2;
  logic mmode;

  function automatic logic [127:0] st1(logic [127:0] s);
    return {s[0] ^ s[99] ^ s[101] ^ s[126], s[127:1]};
  endfunction
  function automatic logic [88:0] st2(logic [88:0] s);
    return {s[0] ^ s[51], s[88:1]};
  endfunction
  function automatic logic [96:0] st3(logic [96:0] s);
    return {s[0] ^ s[91], s[96:1]};
  endfunction

  // advance the model by one keystream bit; returns z and delta
  task automatic model_bit(output logic z, output int d);
    logic [3:0][5:0] ix;
    ix = m1[0] ? mi1 : mi2;
    d = 1;
    for (int k = 0; k < 4; k++) d += int'(m1[ix[k]]) << k;
    if (m1[0]) begin
      for (int i = 0; i < d; i++) m2 = st2(m2);
      n_r2++;
    end else begin
      for (int i = 0; i < d; i++) m3 = st3(m3);
      n_r3++;
    end
    z  = (mmode & m1[0]) ^ m2[0] ^ m3[0];
    m1 = st1(m1);
    if (d < dmin) dmin = d;
    if (d > dmax) dmax = d;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load_key(input logic mode);
    for (int i = 0; i < 128; i += 32) r1_seed[i +: 32] = $urandom;
    r2_seed = {$urandom, $urandom, $urandom};
    r3_seed = {$urandom, $urandom, $urandom, $urandom};
    r1_seed[0] = 1'b1; r2_seed[0] = 1'b1; r3_seed[0] = 1'b1;
    for (int k = 0; k < 4; k++) begin
      idx1[k] = 6'(1 + $urandom % 63);
      idx2[k] = 6'(1 + $urandom % 63);
    end
    mode_r1 = mode;
    load = 1;
    @(negedge clk);
    load = 0;
    m1 = r1_seed; m2 = r2_seed; m3 = r3_seed; mi1 = idx1; mi2 = idx2; mmode = mode;
  endtask

  // run nbits keystream bits, checking each and its spacing
  task automatic run_bits(input int nbits, input bit stall);
    logic z; int d; int gap;
    for (int b = 0; b < nbits; b++) begin
      model_bit(z, d);
      gap = 0;
      do begin
        msg_bit = 1'($urandom);
        if (stall && b % 7 == 3 && gap == 0) begin
          enable = 0;
          repeat (5) @(negedge clk);
          enable = 1;
          n_stall++;
        end
        @(negedge clk);
        gap++;
      end while (!ks_valid && gap < 40);
      check(ks_valid, "keystream bit appears");
      check(ks_bit == z, $sformatf("keystream bit %0d", b));
      check(ct_bit == (z ^ msg_bit), "ciphertext bit");
      if (!stall) check(gap == 1 + d, $sformatf("bit %0d took %0d cycles, expected %0d", b, gap, 1 + d));
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
    load = 0; enable = 0; msg_bit = 0; mode_r1 = 1;
    r1_seed = '0; r2_seed = '0; r3_seed = '0; idx1 = '0; idx2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load_key(1'b1);
    enable = 1;
    run_bits(1500, 1'b0);
    // reload mid-stream, class 2 output
    load_key(1'b0);
    run_bits(1500, 1'b0);
    // stalls
    run_bits(200, 1'b1);
    check(n_r2 > 500 && n_r3 > 500, "both R2 and R3 branches used");
    check(dmin == 1 && dmax == 16, $sformatf("delta range %0d..%0d", dmin, dmax));
    check(n_stall > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
