// tb_aesccmp: end-to-end test of the AES-CCMP engine at its default size.
//
// A host model feeds the AAD words and payload words on request (aad_rd,
// pay_rd), collects the ciphertext blocks and the MIC, and compares them with
// the behavioural CCM model.  Frames covered: the IEEE 802.11i CCMP test
// frame (known ciphertext and MIC), every combination of the A4 and QC
// flags, payloads that end mid-word, mid-block and on a block boundary, an
// empty payload, the 1024-octet maximum frame (64 payload blocks, 67 CBC-MAC
// blocks) and frames started right after the previous MIC.  The MIC must come
// 10*(m+3)+3 cycles after start, i.e. one block every ten cycles.
module tb_aesccmp;
  import ccmp_ref_pkg::*;

  logic clk = 0, rst, start;
  logic [15:0] q, aad, plaintext;
  logic [103:0] n;
  logic [3:0] sc;
  logic [8:0] fc;
  logic flag_a4, flag_qc, data, reserved;
  logic [127:0] tk, ciphertext;
  logic aad_rd, pay_rd, cipher_valid, cipher_last, mic_valid, busy;
  logic [63:0] mic;

  aesccmp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanisms exercised
  int n_flags [4];
  int n_odd = 0, n_partial = 0, n_aligned = 0, n_empty = 0, n_max = 0, n_b2b = 0, n_kat = 0;

  // host-side word stores
  logic [15:0] aw [16];
  logic [15:0] pw [512];
  int ai, pi;
  assign aad       = aw[ai[3:0]];
  assign plaintext = pw[pi[8:0]];
  always @(posedge clk) begin
    if (aad_rd) ai <= ai + 1;
    if (pay_rd) pi <= pi + 1;
  end

  int cyc_now = 0;
  always @(posedge clk) cyc_now <= cyc_now + 1;

  // collected outputs
  bytes_q got_ct;
  int nblk_got, last_seen;
  always @(posedge clk) begin
    if (cipher_valid) begin
      for (int i = 0; i < 16; i++) got_ct.push_back(ciphertext[127-8*i -: 8]);
      nblk_got++;
      if (cipher_last) last_seen++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t: %s", $time, what); end
  endtask

  // Run one frame.  pay holds the payload octets; fc_raw/sc_raw are the
  // unmasked header fields.  kat_ct/kat_mic: known answer, if given.
  task automatic frame(bit [127:0] key, bit [103:0] nonce, bit [15:0] fc_raw, bit [15:0] sc_raw,
                       bit [47:0] a1, bit [47:0] a2, bit [47:0] a3, bit [47:0] a4, bit [15:0] qc,
                       bit a4_on, bit qc_on, bytes_q pay, bit b2b,
                       bytes_q kat_ct = {}, bit [63:0] kat_mic = '0);
    bytes_q ab, exp_ct;
    bit [63:0] exp_mic;
    bit [15:0] fcm = (fc_raw & 16'h878f) | 16'h4000;
    bit [15:0] scm = sc_raw & 16'h000f;
    int wi = 0, m, t0, lat;
    // reference AAD octets
    ab = {fcm[7:0], fcm[15:8]};
    for (int i = 5; i >= 0; i--) ab.push_back(a1[8*i +: 8]);
    for (int i = 5; i >= 0; i--) ab.push_back(a2[8*i +: 8]);
    for (int i = 5; i >= 0; i--) ab.push_back(a3[8*i +: 8]);
    ab.push_back(scm[7:0]); ab.push_back(scm[15:8]);
    if (a4_on) for (int i = 5; i >= 0; i--) ab.push_back(a4[8*i +: 8]);
    if (qc_on) begin ab.push_back(qc[15:8]); ab.push_back(qc[7:0]); end
    ccm_ref(key, nonce, ab, pay, exp_ct, exp_mic);
    // host words: l(a), A1..A3, [A4], [QC]
    foreach (aw[i]) aw[i] = 16'hdead;
    aw[wi++] = 16'(ab.size());
    for (int i = 2; i >= 0; i--) aw[wi++] = a1[16*i +: 16];
    for (int i = 2; i >= 0; i--) aw[wi++] = a2[16*i +: 16];
    for (int i = 2; i >= 0; i--) aw[wi++] = a3[16*i +: 16];
    if (a4_on) for (int i = 2; i >= 0; i--) aw[wi++] = a4[16*i +: 16];
    if (qc_on) aw[wi++] = qc;
    foreach (pw[i]) pw[i] = 16'hbeef;
    for (int i = 0; i < pay.size(); i += 2)
      pw[i/2] = {pay[i], (i + 1 < pay.size()) ? pay[i+1] : 8'h5a};
    m = (pay.size() + 15) / 16;
    // drive
    if (!b2b) @(negedge clk);
    ai = 0; pi = 0;
    got_ct.delete(); nblk_got = 0; last_seen = 0;
    tk = key; n = nonce; q = 16'(pay.size());
    fc = {fc_raw[15], fc_raw[10:7], fc_raw[3:0]};
    sc = sc_raw[3:0];
    flag_a4 = a4_on; flag_qc = qc_on; data = 1'b1; reserved = 1'b0;
    start = 1;
    t0 = cyc_now;
    @(negedge clk);
    start = 0;
    while (!mic_valid && cyc_now - t0 < 2000) @(negedge clk);
    lat = cyc_now - t0;
    chk(mic_valid, "mic_valid seen");
    chk(lat == 10*(m + 3) + 3, $sformatf("MIC latency %0d, expected %0d", lat, 10*(m + 3) + 3));
    chk(mic == exp_mic, $sformatf("MIC %h expected %h", mic, exp_mic));
    chk(nblk_got == m, $sformatf("%0d ciphertext blocks, expected %0d", nblk_got, m));
    chk(last_seen == (m > 0 ? 1 : 0), "cipher_last once");
    chk(ai == 4 + 6 * 1 + (a4_on ? 3 : 0) + (qc_on ? 1 : 0) && pi == (pay.size() + 1) / 2,
        $sformatf("words taken: aad %0d payload %0d", ai, pi));
    for (int i = 0; i < pay.size() && i < got_ct.size(); i++)
      if (got_ct[i] != exp_ct[i]) begin
        chk(0, $sformatf("ciphertext octet %0d: %h expected %h", i, got_ct[i], exp_ct[i]));
        break;
      end
    if (kat_ct.size() > 0) begin
      n_kat++;
      chk(mic == kat_mic, "known-answer MIC");
      for (int i = 0; i < kat_ct.size(); i++)
        if (got_ct[i] != kat_ct[i]) begin chk(0, "known-answer ciphertext"); break; end
    end
    n_flags[{a4_on, qc_on}]++;
    if (pay.size() % 2 == 1) n_odd++;
    if (pay.size() % 16 != 0) n_partial++;
    if (pay.size() % 16 == 0 && pay.size() > 0) n_aligned++;
    if (pay.size() == 0) n_empty++;
    if (pay.size() == 1024) n_max++;
    if (b2b) n_b2b++;
  endtask

  function automatic bytes_q rand_bytes(int len);
    bytes_q b;
    for (int i = 0; i < len; i++) b.push_back(u8'($urandom));
    return b;
  endfunction

  function automatic bit [47:0] r48();
    return {$urandom, $urandom};
  endfunction

  initial begin
    bytes_q kp, kc;
    int lens [8] = '{1, 15, 16, 17, 31, 100, 0, 48};
    rst = 1; start = 0; q = 0; n = 0; sc = 0; fc = 0; flag_a4 = 0; flag_qc = 0;
    data = 1; reserved = 0; tk = 0; ai = 0; pi = 0;
    foreach (aw[i]) aw[i] = 0;
    foreach (pw[i]) pw[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // IEEE 802.11i CCMP test frame
    kp = '{8'hf8,8'hba,8'h1a,8'h55,8'hd0,8'h2f,8'h85,8'hae,8'h96,8'h7b,8'hb6,8'h2f,
           8'hb6,8'hcd,8'ha8,8'heb,8'h7e,8'h78,8'ha0,8'h50};
    kc = '{8'hf3,8'hd0,8'ha2,8'hfe,8'h9a,8'h3d,8'hbf,8'h23,8'h42,8'ha6,8'h43,8'he4,
           8'h32,8'h46,8'he8,8'h0c,8'h3c,8'h04,8'hd0,8'h19};
    frame(128'hc97c1f67ce371185514a8a19f2bdd52f, 104'h005030f1844408b5039776e70c,
          16'h4808, 16'h3380, 48'h0fd2e128a57c, 48'h5030f1844408, 48'habaea5b8fcba,
          48'h0, 16'h0, 0, 0, kp, 0, kc, 64'h7845ce0b16f97623);
    // flag combinations and payload shapes
    for (int k = 0; k < 8; k++)
      frame(rand128(), {$urandom, $urandom, $urandom, $urandom}, 16'($urandom), 16'($urandom),
            r48(), r48(), r48(), r48(), 16'($urandom), k[0], k[1], rand_bytes(lens[k]), 0);
    // back-to-back frames: start in the cycle after mic_valid
    for (int k = 0; k < 3; k++)
      frame(rand128(), {$urandom, $urandom, $urandom, $urandom}, 16'($urandom), 16'($urandom),
            r48(), r48(), r48(), r48(), 16'($urandom), 1, k[0], rand_bytes(20 + 7*k), 1);
    // maximum frame of the throughput figure: 1024 octets, A4 and QC present
    frame(rand128(), {$urandom, $urandom, $urandom, $urandom}, 16'($urandom), 16'($urandom),
          r48(), r48(), r48(), r48(), 16'($urandom), 1, 1, rand_bytes(1024), 0);
    // every mechanism must have occurred
    foreach (n_flags[i]) chk(n_flags[i] > 0, $sformatf("flag combination %0d exercised", i));
    chk(n_odd > 0, "odd payload length exercised");
    chk(n_partial > 0, "partial last block exercised");
    chk(n_aligned > 0, "block-aligned payload exercised");
    chk(n_empty > 0, "empty payload exercised");
    chk(n_max > 0, "1024-octet frame exercised");
    chk(n_b2b > 0, "back-to-back frames exercised");
    chk(n_kat > 0, "known-answer frame exercised");
    $display("frames: flags %0d/%0d/%0d/%0d odd %0d partial %0d aligned %0d empty %0d max %0d b2b %0d kat %0d",
             n_flags[0], n_flags[1], n_flags[2], n_flags[3], n_odd, n_partial, n_aligned,
             n_empty, n_max, n_b2b, n_kat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
