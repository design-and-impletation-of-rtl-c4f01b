// tb_keystream_top: end-to-end test of the three keystream generators at
// their default sizes, through the top-level ports only (internal strobes
// are read just to count how often each mechanism occurred).
//
// For each generator a random message is encrypted, the same key is loaded
// again, and the ciphertext is fed back as the message: the output must be
// the original plaintext (a stream cipher is its own inverse). The keystream
// must also be roughly balanced and must differ between keys. Periods are
// checked where the design fixes them:
//   * stream cipher 2 repeats after (2^9-1)^2 = 261121 bits, with 510 CRC
//     reseeds and one key reload in that span (a full key period is run);
//   * stream cipher 1 repeats after 465 words = 5*31*15 = 2325 bits for the
//     key used here.
// Mechanisms counted (each must occur): ASG clocking of R2 and of R3, both
// output classes, ASG key reload, ASG/SC1/SC2 enable stalls, SC1 hash
// polynomial reload, SC2 reseed and SC2 key reload.
module tb_keystream_top;
  import ks_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---- ports ----
  logic asg_load, asg_mode_r1, asg_enable, asg_msg_bit, asg_ks_valid, asg_ks_bit, asg_ct_bit;
  logic [ASG_L1-1:0] asg_r1_seed;
  logic [ASG_L2-1:0] asg_r2_seed;
  logic [ASG_L3-1:0] asg_r3_seed;
  logic [ASG_W-1:0][ASG_IDXW-1:0] asg_idx1, asg_idx2;
  logic sc1_load, sc1_cfg_load, sc1_enable, sc1_ks_valid;
  logic [SC1_N-1:0] sc1_key, sc1_cfg_poly, sc1_cfg_init, sc1_pt_word, sc1_ks_word, sc1_ct_word;
  logic [SC1_M-SC1_N-1:0] sc1_s_seed;
  logic sc2_load, sc2_enable, sc2_msg_bit, sc2_ks_valid, sc2_ks_bit, sc2_ct_bit, sc2_reseed, sc2_rekey;
  logic [SC2_M-1:0] sc2_key;

  keystream_top dut (.*);

  // ---- mechanism counters ----
  int m_asg_r2 = 0, m_asg_r3 = 0, m_asg_class1 = 0, m_asg_class2 = 0, m_asg_reload = 0;
  int m_asg_stall = 0, m_sc1_stall = 0, m_sc1_cfg = 0, m_sc2_stall = 0;
  int m_sc2_reseed = 0, m_sc2_rekey = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_asg.done && dut.u_asg.step_r2) m_asg_r2++;
    if (dut.u_asg.done && dut.u_asg.step_r3) m_asg_r3++;
    if (asg_ks_valid) begin
      if (dut.u_asg.mode_q) m_asg_class1++; else m_asg_class2++;
    end
    if (sc2_reseed) m_sc2_reseed++;
    if (sc2_rekey)  m_sc2_rekey++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ======================= alternating step generator =======================
  task automatic asg_key(input logic mode, input int unsigned salt);
    for (int i = 0; i < ASG_L1; i += 32) asg_r1_seed[i +: 32] = 32'h9e3779b9 * (i + salt) + 32'h1;
    asg_r2_seed = {3{32'h7f4a7c15 ^ salt}};
    asg_r3_seed = {4{32'h94d049bb + salt}};
    asg_r1_seed[0] = 1; asg_r2_seed[0] = 1; asg_r3_seed[0] = 1;
    asg_idx1 = {6'd17, 6'd63, 6'd2, 6'd45};
    asg_idx2 = {6'd5, 6'd31, 6'd58, 6'd9};
    asg_mode_r1 = mode;
    asg_load = 1; @(negedge clk); asg_load = 0;
    m_asg_reload++;
  endtask

  // run nbits bits, message from msg[], output written to out[]
  task automatic asg_run(input bit msg[], ref bit out[], ref bit ks[], input int nbits);
    for (int b = 0; b < nbits; b++) begin
      int guard = 0;
      asg_msg_bit = msg[b];
      asg_enable = 1;
      if (b % 97 == 50) begin
        asg_enable = 0; repeat (7) @(negedge clk); asg_enable = 1; m_asg_stall++;
      end
      do begin @(negedge clk); guard++; end while (!asg_ks_valid && guard < 40);
      check(asg_ks_valid, "ASG produces a bit");
      out[b] = asg_ct_bit;
      ks[b]  = asg_ks_bit;
    end
    asg_enable = 0;
  endtask

  task automatic asg_process();
    localparam int NB = 1200;
    bit pt[], ct[], dec[], ks1[], ks2[], ks3[];
    int ones, diff;
    pt = new[NB]; ct = new[NB]; dec = new[NB]; ks1 = new[NB]; ks2 = new[NB]; ks3 = new[NB];
    foreach (pt[i]) pt[i] = 1'($urandom);
    for (int mode = 1; mode >= 0; mode--) begin
      asg_key(1'(mode), 11);
      asg_run(pt, ct, ks1, NB);
      asg_key(1'(mode), 11);
      asg_run(ct, dec, ks2, NB);
      ones = 0;
      foreach (pt[i]) begin
        check(dec[i] == pt[i], $sformatf("ASG class %0d round trip bit %0d", 2 - mode, i));
        ones += int'(ks1[i]);
      end
      check(ones > NB * 4 / 10 && ones < NB * 6 / 10, $sformatf("ASG keystream balance %0d/%0d", ones, NB));
      asg_key(1'(mode), 12);              // another key gives another keystream
      asg_run(pt, dec, ks3, NB);
      diff = 0;
      foreach (ks1[i]) diff += int'(ks1[i] != ks3[i]);
      check(diff > NB / 4, "ASG keystream depends on the key");
    end
  endtask

  // ============================ stream cipher 1 =============================
  task automatic sc1_run(input logic [SC1_N-1:0] pt[], ref logic [SC1_N-1:0] out[],
                         ref logic [SC1_N-1:0] ks[], input int nw);
    for (int w = 0; w < nw; w++) begin
      int guard = 0;
      sc1_pt_word = pt[w];
      sc1_enable = 1;
      if (w % 53 == 20) begin
        sc1_enable = 0; repeat (5) @(negedge clk); sc1_enable = 1; m_sc1_stall++;
      end
      do begin @(negedge clk); guard++; end while (!sc1_ks_valid && guard < 40);
      check(sc1_ks_valid, "SC1 produces a word");
      out[w] = sc1_ct_word;
      ks[w]  = sc1_ks_word;
    end
    sc1_enable = 0;
  endtask

  task automatic sc1_process();
    localparam int NW = 1000;
    logic [SC1_N-1:0] pt[], ct[], dec[], ks1[], ks2[], ks3[];
    int diff;
    pt = new[NW]; ct = new[NW]; dec = new[NW]; ks1 = new[NW]; ks2 = new[NW]; ks3 = new[NW];
    foreach (pt[i]) pt[i] = SC1_N'($urandom);
    sc1_key = 5'b10110; sc1_s_seed = 4'b1001;
    sc1_load = 1; @(negedge clk); sc1_load = 0;
    sc1_run(pt, ct, ks1, NW);
    sc1_load = 1; @(negedge clk); sc1_load = 0;
    sc1_run(ct, dec, ks2, NW);
    foreach (pt[i]) check(dec[i] == pt[i], $sformatf("SC1 round trip word %0d", i));
    // period n(2^n-1)(2^(m-n)-1) = 2325 bits = 465 words for this key
    for (int i = 0; i + 465 < NW; i++) check(ks1[i + 465] == ks1[i], "SC1 keystream period 465 words");
    diff = 0;
    for (int p = 1; p < 465; p++) if (ks1[p] != ks1[0] || ks1[p+1] != ks1[1] || ks1[p+2] != ks1[2]) diff++;
    check(diff > 400, "SC1 keystream is not trivially periodic");
    // different hash polynomial (x^5 + x^3 + 1) changes the keystream
    sc1_cfg_poly = 5'b01001; sc1_cfg_init = 5'b11000;
    sc1_cfg_load = 1; @(negedge clk); sc1_cfg_load = 0; m_sc1_cfg++;
    sc1_load = 1; @(negedge clk); sc1_load = 0;
    sc1_run(pt, dec, ks3, 100);
    diff = 0;
    for (int i = 0; i < 100; i++) diff += int'(ks3[i] != ks1[i]);
    check(diff > 50, "SC1 hash polynomial changes the keystream");
  endtask

  // ============================ stream cipher 2 =============================
  task automatic sc2_process();
    localparam int PERIOD = 511 * 511;
    localparam int NB = PERIOD + 3000;
    bit first[], ks_all[];
    int ones = 0, nbits = 0, stall_ct = 0;
    first = new[3000];
    sc2_key = 9'b110010111;
    sc2_load = 1; @(negedge clk); sc2_load = 0;
    while (nbits < NB) begin
      sc2_enable = (nbits % 1000) != 999 || stall_ct > 0;
      if (!sc2_enable) begin stall_ct = 3; m_sc2_stall++; end
      if (stall_ct > 0) stall_ct--;
      sc2_msg_bit = 1'($urandom);
      @(negedge clk);
      if (sc2_enable) begin
        check(sc2_ks_valid, "SC2 bit valid");
        check(sc2_ct_bit == (sc2_ks_bit ^ sc2_msg_bit), "SC2 ciphertext");
        if (nbits < 3000) first[nbits] = sc2_ks_bit;
        else if (nbits >= PERIOD) check(sc2_ks_bit == first[nbits - PERIOD], "SC2 keystream repeats after key period");
        if (nbits < PERIOD) ones += int'(sc2_ks_bit);
        nbits++;
      end
    end
    sc2_enable = 0;
    check(ones > PERIOD * 45 / 100 && ones < PERIOD * 55 / 100, $sformatf("SC2 balance %0d/%0d", ones, PERIOD));
    // round trip on a short message
    begin
      bit pt[], ct[];
      pt = new[2000]; ct = new[2000];
      foreach (pt[i]) pt[i] = 1'($urandom);
      sc2_load = 1; @(negedge clk); sc2_load = 0;
      sc2_enable = 1;
      for (int i = 0; i < 2000; i++) begin sc2_msg_bit = pt[i]; @(negedge clk); ct[i] = sc2_ct_bit; end
      sc2_load = 1; sc2_enable = 0; @(negedge clk); sc2_load = 0;
      sc2_enable = 1;
      for (int i = 0; i < 2000; i++) begin
        sc2_msg_bit = ct[i]; @(negedge clk);
        check(sc2_ct_bit == pt[i], $sformatf("SC2 round trip bit %0d", i));
      end
      sc2_enable = 0;
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    asg_load = 0; asg_mode_r1 = 1; asg_enable = 0; asg_msg_bit = 0;
    asg_r1_seed = '0; asg_r2_seed = '0; asg_r3_seed = '0; asg_idx1 = '0; asg_idx2 = '0;
    sc1_load = 0; sc1_cfg_load = 0; sc1_enable = 0; sc1_key = '0; sc1_s_seed = '0;
    sc1_cfg_poly = '0; sc1_cfg_init = '0; sc1_pt_word = '0;
    sc2_load = 0; sc2_enable = 0; sc2_msg_bit = 0; sc2_key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      asg_process();
      sc1_process();
      sc2_process();
    join
    $display("mechanisms: asg_r2=%0d asg_r3=%0d asg_class1=%0d asg_class2=%0d asg_reload=%0d asg_stall=%0d",
             m_asg_r2, m_asg_r3, m_asg_class1, m_asg_class2, m_asg_reload, m_asg_stall);
    $display("mechanisms: sc1_stall=%0d sc1_cfg=%0d sc2_reseed=%0d sc2_rekey=%0d sc2_stall=%0d",
             m_sc1_stall, m_sc1_cfg, m_sc2_reseed, m_sc2_rekey, m_sc2_stall);
    check(m_asg_r2 > 0, "ASG clocked R2");
    check(m_asg_r3 > 0, "ASG clocked R3");
    check(m_asg_class1 > 0, "ASG class 1 output");
    check(m_asg_class2 > 0, "ASG class 2 output");
    check(m_asg_reload > 0, "ASG key reload");
    check(m_asg_stall > 0, "ASG stall");
    check(m_sc1_stall > 0, "SC1 stall");
    check(m_sc1_cfg > 0, "SC1 hash polynomial reload");
    check(m_sc2_reseed >= 510, "SC2 reseeds");
    check(m_sc2_rekey >= 1, "SC2 key reload");
    check(m_sc2_stall > 0, "SC2 stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
