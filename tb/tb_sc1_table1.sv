// tb_sc1_table1: runs stream cipher 1 at the five (n, m) sizes of its
// periodicity table - (4,7), (5,8), (5,9), (7,10), (7,11) - for many keys
// each and measures the keystream period. The table's value
// n * (2^n - 1) * (2^(m-n) - 1) (420, 1085, 2325, 6223, 13335 bits) is a
// key-dependent figure: the test prints, per size, the longest period seen
// and how many keys reach the table value, and checks that every period is a
// multiple of the state-register period and within the state-count bound.
// For n = 5 and n = 7 most keys must reach the table value; for n = 4 no
// choice of primitive hash polynomial and start state reaches it (the
// longest period is 224 bits), so that row is only reported.
// Hash polynomials: x^4+x+1, x^5+x^2+1, x^7+x+1, with the hash LFSR started
// at all ones (n = 4, 5) or at 7'd38 (n = 7); state-register polynomials:
// x^3+x+1, x^4+x+1.
module tb_sc1_table1;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic d[5];
  int   mx[5], nf[5], nb[5];

  sc1_period_probe #(.N(4), .M(7),  .HPOLY(4'b0011),    .SPOLY(3'b011),  .NKEYS(16)) u0 (.clk, .rst_n, .done(d[0]), .max_bits(mx[0]), .n_formula(nf[0]), .n_bad(nb[0]));
  sc1_period_probe #(.N(5), .M(8),  .HPOLY(5'b00101),   .SPOLY(3'b011),  .NKEYS(32)) u1 (.clk, .rst_n, .done(d[1]), .max_bits(mx[1]), .n_formula(nf[1]), .n_bad(nb[1]));
  sc1_period_probe #(.N(5), .M(9),  .HPOLY(5'b00101),   .SPOLY(4'b0011), .NKEYS(32)) u2 (.clk, .rst_n, .done(d[2]), .max_bits(mx[2]), .n_formula(nf[2]), .n_bad(nb[2]));
  sc1_period_probe #(.N(7), .M(10), .HPOLY(7'b0000011), .SPOLY(3'b011),  .NKEYS(128), .HINITP(7'd38)) u3 (.clk, .rst_n, .done(d[3]), .max_bits(mx[3]), .n_formula(nf[3]), .n_bad(nb[3]));
  sc1_period_probe #(.N(7), .M(11), .HPOLY(7'b0000011), .SPOLY(4'b0011), .NKEYS(128), .HINITP(7'd38)) u4 (.clk, .rst_n, .done(d[4]), .max_bits(mx[4]), .n_formula(nf[4]), .n_bad(nb[4]));

  localparam int NN[5]   = '{4, 5, 5, 7, 7};
  localparam int MM[5]   = '{7, 8, 9, 10, 11};
  localparam int KEYS[5] = '{16, 32, 32, 128, 128};
  localparam int TAB[5]  = '{420, 1085, 2325, 6223, 13335};

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    for (int c = 0; c < 5; c++) begin
      $display("n=%0d m=%0d: longest period %0d bits over %0d keys, %0d keys reach the table value %0d",
               NN[c], MM[c], mx[c], KEYS[c], nf[c], TAB[c]);
      checks++;
      if (nb[c] != 0) begin failures++; $display("FAIL: n=%0d m=%0d: %0d periods break the bounds", NN[c], MM[c], nb[c]); end
      checks++;
      if (mx[c] < (MM[c] - NN[c] > 0 ? NN[c] * ((1 << (MM[c] - NN[c])) - 1) : 1)) begin
        failures++; $display("FAIL: n=%0d m=%0d: implausibly short periods", NN[c], MM[c]);
      end
    end
    for (int c = 1; c < 5; c++) begin
      checks++;
      if (nf[c] * 2 < KEYS[c]) begin
        failures++; $display("FAIL: n=%0d m=%0d: only %0d keys reach the table period", NN[c], MM[c], nf[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
