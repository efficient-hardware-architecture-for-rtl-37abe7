// aes_sbox_dp: dual-port read-only memory holding the AES S-box.
//
// Two independent 8-bit addresses are looked up in the same 256 x 8 table, so
// one memory serves two S-box substitutions.  The AES core needs twenty S-box
// lookups per round (sixteen for SubBytes, four for the key schedule), which
// this arrangement covers with ten memories.  The contents are computed at
// elaboration from the GF(2^8) definition of the S-box: inverse, then
// the affine transform (ccmp_pkg::sbox_affine).
//
// Timing: read is combinational (address to data in the same cycle), as a
// distributed/LUT ROM.  The original FPGA build mapped these tables to block
// RAM; a synchronous-read variant would need the round register moved behind
// the memory, which this design does not do.
module aes_sbox_dp
  import ccmp_pkg::*;
(
  input  byte_t addr_a,
  input  byte_t addr_b,
  output byte_t data_a,
  output byte_t data_b
);

  byte_t mem [256];

  // Walk the multiplicative group: p runs through 3^k and q through 3^-k,
  // so q is the inverse of p; each entry is the affine transform of q.
  initial begin
    byte_t p, q;
    p = 8'h01;
    q = 8'h01;
    mem[0] = 8'h63;
    for (int k = 0; k < 255; k++) begin
      mem[p] = sbox_affine(q);
      p = p ^ xtime(p);                     // p * 3
      q = q ^ (q << 1);                     // q / 3: multiply by 0xf6
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
    end
  end

  assign data_a = mem[addr_a];
  assign data_b = mem[addr_b];

endmodule
