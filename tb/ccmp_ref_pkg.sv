// ccmp_ref_pkg: behavioural reference model for the AES-CCMP testbenches.
//
// A plain, byte-array AES-128 (FIPS-197) and CCM (M = 8, L = 2) written
// independently of the RTL: the S-box comes from exponent/logarithm tables
// over the generator 3 rather than from the RTL's inversion routine, the key
// schedule is expanded in full up front, and CCM formatting is done on octet
// queues.  Not synthesizable.
package ccmp_ref_pkg;

  typedef bit [7:0] u8;
  typedef u8 bytes_q[$];

  function automatic u8 ref_xt(u8 a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic u8 ref_rotl(u8 a, int s);
    return (a << s) | (a >> (8 - s));
  endfunction

  function automatic u8 ref_sbox(u8 a);
    u8  e [256];
    int l [256];
    u8  inv, b;
    e[0] = 8'h01;
    for (int i = 1; i < 256; i++) e[i] = e[i-1] ^ ref_xt(e[i-1]);
    for (int i = 0; i < 255; i++) l[e[i]] = i;
    inv = (a == 0) ? 8'h00 : e[(255 - l[a]) % 255];
    b = inv ^ ref_rotl(inv, 1) ^ ref_rotl(inv, 2) ^ ref_rotl(inv, 3) ^ ref_rotl(inv, 4) ^ 8'h63;
    return b;
  endfunction

  // Precomputed table, filled on first use.
  u8  sb [256];
  bit sb_ok = 0;

  function automatic u8 S(u8 a);
    if (!sb_ok) begin
      for (int i = 0; i < 256; i++) sb[i] = ref_sbox(u8'(i));
      sb_ok = 1;
    end
    return sb[a];
  endfunction

  function automatic bit [127:0] aes_enc(bit [127:0] key, bit [127:0] pt);
    u8 w [176];
    u8 s [16], t [16];
    u8 rc = 8'h01;
    for (int i = 0; i < 16; i++) w[i] = key[127-8*i -: 8];
    for (int i = 16; i < 176; i += 4) begin
      u8 tmp [4];
      for (int j = 0; j < 4; j++) tmp[j] = w[i-4+j];
      if (i % 16 == 0) begin
        u8 t0 = tmp[0];
        tmp[0] = S(tmp[1]) ^ rc; tmp[1] = S(tmp[2]); tmp[2] = S(tmp[3]); tmp[3] = S(t0);
        rc = ref_xt(rc);
      end
      for (int j = 0; j < 4; j++) w[i+j] = w[i-16+j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127-8*i -: 8] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = S(s[i]);
      // row = i%4, column = i/4; row r shifts left by r
      for (int i = 0; i < 16; i++) t[i] = s[(i + 4*(i%4)) % 16];
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          u8 a0 = t[4*c], a1 = t[4*c+1], a2 = t[4*c+2], a3 = t[4*c+3];
          u8 x = a0 ^ a1 ^ a2 ^ a3;
          s[4*c]   = a0 ^ x ^ ref_xt(a0 ^ a1);
          s[4*c+1] = a1 ^ x ^ ref_xt(a1 ^ a2);
          s[4*c+2] = a2 ^ x ^ ref_xt(a2 ^ a3);
          s[4*c+3] = a3 ^ x ^ ref_xt(a3 ^ a0);
        end
      end else begin
        s = t;
      end
      for (int i = 0; i < 16; i++) s[i] ^= w[16*r + i];
    end
    begin
      bit [127:0] o;
      for (int i = 0; i < 16; i++) o[127-8*i -: 8] = s[i];
      return o;
    end
  endfunction

  // Octets of a block, first octet first.
  function automatic bit [127:0] blk_of(bytes_q b, int off);
    bit [127:0] o = '0;
    for (int i = 0; i < 16; i++)
      o[127-8*i -: 8] = (off + i < b.size()) ? b[off + i] : 8'h00;
    return o;
  endfunction

  // CCM with M = 8, L = 2 over the given AAD and payload octets.
  // Returns the ciphertext octets and the 64-bit encrypted MIC.
  function automatic void ccm_ref(bit [127:0] tk, bit [103:0] nonce,
                                  bytes_q aad, bytes_q pay,
                                  output bytes_q ct, output bit [63:0] mic);
    bit [127:0] x, s;
    bytes_q     ab;
    int         np;
    x = aes_enc(tk, {8'h59, nonce, 16'(pay.size())});
    ab.push_back(u8'(aad.size() >> 8));
    ab.push_back(u8'(aad.size()));
    foreach (aad[i]) ab.push_back(aad[i]);
    for (int o = 0; o < ab.size(); o += 16) x = aes_enc(tk, x ^ blk_of(ab, o));
    np = (pay.size() + 15) / 16;
    for (int b = 0; b < np; b++) x = aes_enc(tk, x ^ blk_of(pay, 16*b));
    ct.delete();
    for (int b = 0; b < np; b++) begin
      s = aes_enc(tk, {8'h01, nonce, 16'(b + 1)});
      for (int i = 0; i < 16 && 16*b + i < pay.size(); i++)
        ct.push_back(pay[16*b + i] ^ s[127-8*i -: 8]);
    end
    s   = aes_enc(tk, {8'h01, nonce, 16'h0000});
    mic = x[127:64] ^ s[127:64];
  endfunction

  // Round key r (0..10) of the AES-128 key schedule.
  function automatic bit [127:0] ref_round_key(bit [127:0] key, int r);
    bit [31:0] w [44];
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      bit [31:0] tmp = w[i-1];
      if (i % 4 == 0) begin
        tmp = {S(tmp[23:16]) ^ rc, S(tmp[15:8]), S(tmp[7:0]), S(tmp[31:24])};
        rc = ref_xt(rc);
      end
      w[i] = w[i-4] ^ tmp;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // One AES round on a block: SubBytes, ShiftRows, MixColumns unless last,
  // AddRoundKey.
  function automatic bit [127:0] round_ref(bit [127:0] st, bit [127:0] rk, bit last);
    u8 s [16], t [16];
    bit [127:0] o;
    for (int i = 0; i < 16; i++) s[i] = S(st[127-8*i -: 8]);
    for (int i = 0; i < 16; i++) t[i] = s[(i + 4*(i%4)) % 16];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        u8 a0 = t[4*c], a1 = t[4*c+1], a2 = t[4*c+2], a3 = t[4*c+3];
        u8 x = a0 ^ a1 ^ a2 ^ a3;
        t[4*c]   = a0 ^ x ^ ref_xt(a0 ^ a1);
        t[4*c+1] = a1 ^ x ^ ref_xt(a1 ^ a2);
        t[4*c+2] = a2 ^ x ^ ref_xt(a2 ^ a3);
        t[4*c+3] = a3 ^ x ^ ref_xt(a3 ^ a0);
      end
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = t[i];
    return o ^ rk;
  endfunction

  function automatic bit [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
