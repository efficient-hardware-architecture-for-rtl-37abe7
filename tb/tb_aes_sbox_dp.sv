// tb_aes_sbox_dp: checks every entry of the dual-port S-box memory on both
// ports against the reference S-box (built from exp/log tables), with the
// two ports reading different addresses at once.
module tb_aes_sbox_dp;
  import ccmp_ref_pkg::*;
  logic [7:0] addr_a, addr_b, data_a, data_b;
  int checks = 0, failures = 0;

  aes_sbox_dp dut (.addr_a, .addr_b, .data_a, .data_b);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      addr_a = 8'(i);
      addr_b = 8'(255 - i);
      #1;
      checks += 2;
      if (data_a !== S(addr_a)) begin failures++; $display("port a %h: %h", addr_a, data_a); end
      if (data_b !== S(addr_b)) begin failures++; $display("port b %h: %h", addr_b, data_b); end
    end
    // known points of FIPS-197
    addr_a = 8'h00; addr_b = 8'h53; #1;
    checks += 2;
    if (data_a !== 8'h63) failures++;
    if (data_b !== 8'hed) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
