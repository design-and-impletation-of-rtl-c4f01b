// tb_asg_delta: self-checking test of the decimation function.
//
// Random R1 states and random index sets are applied; the output must equal
// 1 + sum_k 2^k * R1[idx_k], computed here by direct bit selection. A few
// fixed cases check the extremes 1 and 2^W and repeated indices.
module tb_asg_delta;
  localparam int L = 128, W = 4, IDXW = 6;
  int checks = 0, failures = 0;

  logic [L-1:0]           r1;
  logic [W-1:0][IDXW-1:0] idx;
  logic [W:0]             delta;

  asg_delta #(.L(L), .W(W), .IDXW(IDXW)) dut (.r1, .idx, .delta);

  function automatic int expect_delta(logic [L-1:0] s, logic [W-1:0][IDXW-1:0] ix);
    int d = 1;
    for (int k = 0; k < W; k++) if (s[ix[k]]) d += (1 << k);
    return d;
  endfunction

  task automatic apply(input string what);
    #1;
    checks++;
    if (int'(delta) != expect_delta(r1, idx)) begin
      failures++;
      $display("FAIL: %s r1=%h idx=%p delta=%0d exp=%0d", what, r1, idx, delta,
               expect_delta(r1, idx));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r1 = '0; idx = '0;
    apply("all zero");
    checks++; if (delta != 1) begin failures++; $display("FAIL: minimum delta"); end
    r1 = '1; idx = {6'd63, 6'd40, 6'd7, 6'd1};
    apply("all ones");
    checks++; if (delta != 16) begin failures++; $display("FAIL: maximum delta"); end
    r1 = '0; r1[5] = 1'b1; idx = {6'd5, 6'd5, 6'd4, 6'd6};
    apply("repeated index");
    checks++; if (delta != 13) begin failures++; $display("FAIL: weights of idx 2,3"); end
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < L; i += 32) r1[i +: 32] = $urandom;
      for (int k = 0; k < W; k++) idx[k] = IDXW'($urandom);
      apply("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
