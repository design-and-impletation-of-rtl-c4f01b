// tb_sc2: self-checking test of stream cipher 2 at its default size
// (Q(x) = x^9 + x^4 + 1, G1 of degree 6, G2 of degree 2, n = 9).
//
// The reference model steps the LFSR by s(k+9) = s(k+4) ^ s(k), applies the
// filter written out term by term, records the bits leaving the LFSR in each
// interval and computes their CRC remainders by appending D zero bits and
// reducing modulo G(x) (a different formulation from the circuit's). Every
// keystream bit is compared over one full key period of (2^9-1)^2 = 261121
// enabled cycles plus a margin, with random enable stalls. The test checks
// that a reseed happens every 511 enabled cycles, that the key is reloaded
// after 510 reseeds, and that the keystream then repeats.
module tb_sc2;
  localparam int M = 9;
  localparam int PERIOD = 511 * 511;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int n_reseed = 0, n_rekey = 0, n_stall = 0;

  always #5 clk = ~clk;

  logic load, enable, msg_bit, ks_valid, ks_bit, ct_bit, reseed, rekey;
  logic [M-1:0] key;

  sc2 dut (.clk, .rst_n, .load, .key, .enable, .msg_bit, .ks_valid, .ks_bit,
           .ct_bit, .reseed, .rekey);

  // reference model
  logic [8:0] ms, mkey;
  int mcyc, mres;
  logic [6:0] acc1;   // dividend window for G1 (degree 6)
  logic [2:0] acc2;   // dividend window for G2 (degree 2)

  function automatic logic [6:0] red1(logic [6:0] r);
    return r[6] ? (r ^ 7'b1111001) : r;
  endfunction
  function automatic logic [2:0] red2(logic [2:0] r);
    return r[2] ? (r ^ 3'b111) : r;
  endfunction

  // one enabled cycle of the model: returns the keystream bit and events
  task automatic model_cycle(output logic z, output bit rs, output bit rk);
    z = ms[0] ^ (ms[1] & ms[2]) ^ (ms[3] & ms[4]) ^ (ms[5] & ms[6]) ^ (ms[7] & ms[8]);
    rs = 0; rk = 0;
    if (mcyc == 510) begin
      logic [6:0] r1; logic [2:0] r2;
      r1 = acc1; r2 = acc2;
      for (int i = 0; i < 6; i++) r1 = red1({r1[5:0], 1'b0});
      for (int i = 0; i < 2; i++) r2 = red2({r2[1:0], 1'b0});
      if (mres == 510) begin ms = mkey; mres = 0; rk = 1; end
      else begin ms = {1'b1, r1[5:0], r2[1:0]}; mres++; rs = 1; end
      mcyc = 0; acc1 = '0; acc2 = '0;
    end else begin
      acc1 = red1({acc1[5:0], ms[0]});
      acc2 = red2({acc2[1:0], ms[0]});
      ms = {ms[0] ^ ms[4], ms[8:1]};
      mcyc++;
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit first[0:1999];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic z; bit rs, rk, en_prev;
    logic msg_prev;
    int nbits = 0;
    load = 0; enable = 0; msg_bit = 0; key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    key = 9'b101100111; load = 1;
    @(negedge clk); load = 0;
    ms = key; mkey = key; mcyc = 0; mres = 0; acc1 = '0; acc2 = '0;
    en_prev = 0;
    while (nbits < PERIOD + 2000) begin
      // outputs of the previous enabled cycle are visible now
      enable = ($urandom % 16) != 0;
      if (!enable) n_stall++;
      msg_bit = 1'($urandom);
      if (enable) model_cycle(z, rs, rk);
      @(negedge clk);
      check(ks_valid == enable, "ks_valid follows enable");
      if (enable) begin
        check(ks_bit == z, $sformatf("keystream bit %0d", nbits));
        check(ct_bit == (z ^ msg_bit), "ciphertext bit");
        check(reseed == rs && rekey == rk, $sformatf("reseed/rekey flags at bit %0d", nbits));
        if (nbits < 2000) first[nbits] = z;
        else if (nbits >= PERIOD) check(z == first[nbits - PERIOD], "keystream repeats after the key period");
        if (rs && nbits < PERIOD) n_reseed++;
        if (rk) begin
          n_rekey++;
          check(nbits == PERIOD - 1, $sformatf("key reload at bit %0d", nbits));
        end
        nbits++;
      end else begin
        check(!reseed && !rekey, "no events while stalled");
      end
    end
    check(n_reseed == 510, $sformatf("%0d reseeds in one key period", n_reseed));
    check(n_rekey == 1, "one key reload");
    check(n_stall > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
