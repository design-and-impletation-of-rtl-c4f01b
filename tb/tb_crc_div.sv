// tb_crc_div: self-checking test of the serial division circuit.
//
// Two instances, G1(x) = x^6+x^5+x^4+x^3+1 and G2(x) = x^2+x+1, absorb random
// bit streams. The reference performs schoolbook long division of
// B(x) * x^D by G(x) on a bit array and compares the remainder; clear and
// shift-enable behaviour are checked as well.
module tb_crc_div;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic clear, shift, bit_in;
  logic [5:0] rem1;
  logic [1:0] rem2;

  crc_div #(.D(6), .POLY(6'b111001)) dut1 (.clk, .rst_n, .clear, .shift, .bit_in, .rem(rem1));
  crc_div #(.D(2), .POLY(2'b11))     dut2 (.clk, .rst_n, .clear, .shift, .bit_in, .rem(rem2));

  // g[i] is the coefficient of x^(D-i) (g[0] = 1, leading term)
  function automatic logic [5:0] long_div(bit msg[], int len, bit g[], int d);
    bit r[];
    logic [5:0] out = '0;
    r = new[len + d];
    for (int i = 0; i < len + d; i++) r[i] = (i < len) ? msg[i] : 1'b0;
    for (int i = 0; i < len; i++)
      if (r[i]) for (int j = 0; j <= d; j++) r[i+j] ^= g[j];
    for (int j = 0; j < d; j++) out[d-1-j] = r[len+j];
    return out;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit g1[] = '{1, 1, 1, 1, 0, 0, 1};   // x^6 x^5 x^4 x^3 x^2 x 1
    bit g2[] = '{1, 1, 1};
    clear = 0; shift = 0; bit_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int len;
      bit msg[];
      logic [5:0] e1, e2;
      len = 1 + $urandom % 60;
      msg = new[len];
      foreach (msg[i]) msg[i] = 1'($urandom);
      clear = 1; @(negedge clk); clear = 0;
      check(rem1 == '0 && rem2 == '0, "clear");
      for (int i = 0; i < len; i++) begin
        if ($urandom % 4 == 0) begin   // idle cycle, input must be ignored
          shift = 0; bit_in = 1'($urandom); @(negedge clk);
        end
        shift = 1; bit_in = msg[i]; @(negedge clk);
      end
      shift = 0;
      e1 = long_div(msg, len, g1, 6);
      e2 = long_div(msg, len, g2, 2);
      check(rem1 == e1, $sformatf("G1 remainder of %0d bits: %b vs %b", len, rem1, e1));
      check(rem2 == e2[1:0], $sformatf("G2 remainder of %0d bits: %b vs %b", len, rem2, e2[1:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
