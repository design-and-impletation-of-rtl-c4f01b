// tb_sc2_table2: stream cipher 2 at the smaller LFSR sizes of its
// periodicity table (LFSR periods 15, 31 and 127, i.e. m = 4, 5, 7), besides
// the default m = 9 covered by tb_sc2. With n = m the key is reloaded every
// (2^m - 1)^2 bits (225, 961, 16129), the table's filter-generator
// periodicity. The test measures the smallest period of the keystream, which
// must equal that value, and counts 2^m - 2 reseeds per key period.
// Polynomials: Q = x^4+x+1, x^5+x^2+1, x^7+x+1; G2 = x^2+x+1 throughout; G1
// of degree m-3 (x+1, x^2+x+1, x^4+x+1) so that the seed keeps one padding
// bit.
module tb_sc2_table2;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic d[3];
  int   per[3], rs[3];

  sc2_period_probe #(.M(4), .QPOLY(4'b0011),    .D1(1), .G1POLY(1'b1),    .KEY(4'b1001))   u0 (.clk, .rst_n, .done(d[0]), .period(per[0]), .reseeds(rs[0]));
  sc2_period_probe #(.M(5), .QPOLY(5'b00101),   .D1(2), .G1POLY(2'b11),   .KEY(5'b10011))  u1 (.clk, .rst_n, .done(d[1]), .period(per[1]), .reseeds(rs[1]));
  sc2_period_probe #(.M(7), .QPOLY(7'b0000011), .D1(4), .G1POLY(4'b0011), .KEY(7'b1010011)) u2 (.clk, .rst_n, .done(d[2]), .period(per[2]), .reseeds(rs[2]));

  localparam int MM[3] = '{4, 5, 7};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2]);
    for (int c = 0; c < 3; c++) begin
      int exp_p;
      exp_p = ((1 << MM[c]) - 1) * ((1 << MM[c]) - 1);
      $display("m=%0d: keystream period %0d bits (table value %0d), %0d reseeds per key period",
               MM[c], per[c], exp_p, rs[c]);
      checks++;
      if (per[c] != exp_p) begin failures++; $display("FAIL: m=%0d period", MM[c]); end
      checks++;
      if (rs[c] != (1 << MM[c]) - 2) begin failures++; $display("FAIL: m=%0d reseed count", MM[c]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
