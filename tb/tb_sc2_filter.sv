// tb_sc2_filter: exhaustive test of the 9-input nonlinear filter.
//
// All 512 inputs are applied and compared with
// f = x0 ^ x1x2 ^ x3x4 ^ x5x6 ^ x7x8 written out term by term. The test also
// confirms the function is balanced (256 ones) and not affine (some input
// pair breaks linearity).
module tb_sc2_filter;
  int checks = 0, failures = 0;
  logic [8:0] x;
  logic y;
  int ones = 0;
  bit nonlinear = 0;
  bit tbl[512];

  sc2_filter #(.NF(9)) dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic e;
      x = 9'(v);
      #1;
      e = x[0] ^ (x[1] & x[2]) ^ (x[3] & x[4]) ^ (x[5] & x[6]) ^ (x[7] & x[8]);
      checks++;
      if (y !== e) begin failures++; $display("FAIL: x=%b y=%b expected %b", x, y, e); end
      tbl[v] = y;
      ones += int'(y);
    end
    for (int a = 0; a < 512; a++)
      for (int b = 0; b < 512; b += 37)
        if ((tbl[a] ^ tbl[b] ^ tbl[0]) != tbl[a ^ b]) nonlinear = 1;
    checks++; if (ones != 256) begin failures++; $display("FAIL: unbalanced %0d", ones); end
    checks++; if (!nonlinear) begin failures++; $display("FAIL: filter is affine"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
