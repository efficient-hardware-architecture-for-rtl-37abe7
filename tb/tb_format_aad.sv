// tb_format_aad: builds the AAD blocks for all four A4/QC combinations with
// random header fields and compares both 128-bit blocks with the CCM layout
// l(a) | masked FC | A1 | A2 | A3 | masked SC | [A4] | [QC] | zeros, built
// here from the raw 16-bit FC and SC.  Also checks the AAD lengths of the
// four cases (176, 224, 192, 240 bits), that a block is ready nine cycles
// after start or consume, that the block is held until consumed, the number
// of words read, and the a_ad pulse.
module tb_format_aad;
  import ccmp_ref_pkg::*;
  logic clk = 0, rst, start_fa, flag_a4, flag_qc, consume, aad_rd, flag_fa, a_ad;
  logic [15:0] aad;
  logic [3:0] sc;
  logic [8:0] fc;
  logic [127:0] pay_aad;
  int checks = 0, failures = 0;

  format_aad dut (.clk, .rst, .start_fa, .flag_a4, .flag_qc, .aad, .sc, .fc, .consume,
                  .aad_rd, .pay_aad, .flag_fa, .a_ad);

  always #5 clk = ~clk;

  logic [15:0] aw [16];
  int ai;
  assign aad = aw[ai[3:0]];
  always @(posedge clk) if (aad_rd) ai <= ai + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t: %s", $time, what); end
  endtask

  initial begin
    int aad_bits [4] = '{176, 192, 224, 240};   // index {a4, qc}
    rst = 1; start_fa = 0; consume = 0; flag_a4 = 0; flag_qc = 0; sc = 0; fc = 0; ai = 0;
    foreach (aw[i]) aw[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 12; k++) begin
      bit a4_on, qc_on;
      bit [15:0] fc_raw, sc_raw, fcm, scm, qc;
      bit [47:0] a [4];
      bytes_q ab;
      int wi, wait1;
      a4_on = k[1]; qc_on = k[0];
      fc_raw = 16'($urandom); sc_raw = 16'($urandom); qc = 16'($urandom);
      foreach (a[i]) a[i] = {$urandom, $urandom};
      fcm = (fc_raw & 16'h878f) | 16'h4000;
      scm = sc_raw & 16'h000f;
      ab = {fcm[7:0], fcm[15:8]};
      for (int j = 0; j < 3; j++) for (int i = 5; i >= 0; i--) ab.push_back(a[j][8*i +: 8]);
      ab.push_back(scm[7:0]); ab.push_back(scm[15:8]);
      if (a4_on) for (int i = 5; i >= 0; i--) ab.push_back(a[3][8*i +: 8]);
      if (qc_on) begin ab.push_back(qc[15:8]); ab.push_back(qc[7:0]); end
      chk(ab.size() * 8 == aad_bits[{a4_on, qc_on}], "AAD length for the flag combination");
      ab.push_front(u8'(ab.size()));
      ab.push_front(8'h00);
      wi = 0;
      aw[wi++] = {ab[0], ab[1]};
      for (int j = 0; j < 3; j++) for (int i = 2; i >= 0; i--) aw[wi++] = a[j][16*i +: 16];
      if (a4_on) for (int i = 2; i >= 0; i--) aw[wi++] = a[3][16*i +: 16];
      if (qc_on) aw[wi++] = qc;
      @(negedge clk);
      ai = 0;
      fc = {fc_raw[15], fc_raw[10:7], fc_raw[3:0]}; sc = sc_raw[3:0];
      flag_a4 = a4_on; flag_qc = qc_on;
      start_fa = 1;
      @(negedge clk);
      start_fa = 0;
      for (int b = 0; b < 2; b++) begin
        repeat (8) begin chk(!flag_fa, "not ready while filling"); @(negedge clk); end
        chk(flag_fa, "ready after eight words");
        chk(pay_aad == blk_of(ab, 16*b), $sformatf("block %0d: %h exp %h", b, pay_aad, blk_of(ab, 16*b)));
        wait1 = $urandom_range(0, 3);
        repeat (wait1) begin @(negedge clk); chk(flag_fa && pay_aad == blk_of(ab, 16*b), "held"); end
        consume = 1;
        #1;
        chk(a_ad == (b == 1), "a_ad on the last consume");
        @(negedge clk);
        consume = 0;
      end
      chk(!flag_fa, "idle after two blocks");
      chk(ai == wi, $sformatf("AAD words read %0d, expected %0d", ai, wi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
