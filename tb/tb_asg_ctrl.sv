// tb_asg_ctrl: self-checking test of the clock-control FSM.
//
// For random A0 and random del1/del2 in 1..16 the FSM must spend one cycle
// in S1 and then clock exactly del1 times R2 (A0 = 1) or del2 times R3
// (A0 = 0), never both, with done/step_r1 high only in the last clocking
// cycle. Holding enable low must keep it in S1; restart must abort a run.
module tb_asg_ctrl;
  import ks_pkg::*;
  localparam int DW = 5;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int n_r2 = 0, n_r3 = 0;

  always #5 clk = ~clk;

  logic restart, enable, a0, step_r1, step_r2, step_r3, done;
  logic [DW-1:0] del1, del2;
  ccg_state_e state;

  asg_ctrl #(.DW(DW)) dut (.clk, .rst_n, .restart, .enable, .a0, .del1, .del2,
                           .step_r1, .step_r2, .step_r3, .done, .state);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    restart = 0; enable = 0; a0 = 0; del1 = 1; del2 = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // enable low: stays in S1, no clocking
    repeat (3) begin
      @(negedge clk);
      check(state == CCG_S1 && !step_r2 && !step_r3 && !step_r1, "idle while disabled");
    end
    for (int n = 0; n < 600; n++) begin
      a0   = 1'($urandom);
      del1 = DW'(1 + ($urandom % 16));
      del2 = DW'(1 + ($urandom % 16));
      d    = a0 ? int'(del1) : int'(del2);
      enable = 1;
      // S1 cycle
      check(state == CCG_S1 && !step_r2 && !step_r3 && !done, "decision cycle");
      @(negedge clk);
      enable = 0;
      a0 = ~a0;          // inputs may change once the decision is taken
      del1 = 5'd9; del2 = 5'd3;
      for (int i = 1; i <= d; i++) begin
        check((a0 ? step_r3 : step_r2) && !(a0 ? step_r2 : step_r3),
              $sformatf("clocking the chosen register, step %0d of %0d", i, d));
        check(done == (i == d) && step_r1 == (i == d), "done only in last cycle");
        @(negedge clk);
      end
      if (!a0) n_r2++; else n_r3++;
    end
    // restart aborts
    enable = 1; a0 = 1; del1 = 16;
    @(negedge clk); enable = 0;
    repeat (3) @(negedge clk);
    restart = 1; @(negedge clk); restart = 0;
    check(state == CCG_S1 && !step_r2, "restart returns to S1");
    check(n_r2 > 100 && n_r3 > 100, "both branches exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
