// ccmp_pkg: types, constants and GF(2^8) helpers shared by the AES-CCMP datapath.
//
// Byte order: a 128-bit block is stored big-endian, bits [127:120] hold the
// first byte.  The AES state byte s[r][c] is block byte 4*c+r (FIPS-197 order).
// The CCM constants follow the IEEE 802.11i profile of CCM: M = 8 octets of
// MIC and L = 2 octets of length field, which fixes the flag bytes of B0 and
// of the counter blocks.  The S-box is not tabulated: the S-box memories are
// filled at elaboration by walking GF(2^8) and applying sbox_affine().
package ccmp_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  // CCM parameters of the 802.11i profile.
  localparam int unsigned CCM_M = 8;   // MIC length, octets
  localparam int unsigned CCM_L = 2;   // length-field size, octets
  // Flag fields of B0 (M' and L') and of the counter blocks (L').
  localparam logic [2:0] CCM_MP = 3'((CCM_M - 2) / 2);  // 3'b011
  localparam logic [2:0] CCM_LP = 3'(CCM_L - 1);        // 3'b001

  // Source selector of the block multiplexer in front of the CBC-MAC.
  typedef enum logic [1:0] {
    SRC_NQ  = 2'b00,   // initial block B0 from Format_N&Q
    SRC_AAD = 2'b01,   // AAD blocks from Format_AAD
    SRC_PAY = 2'b10    // payload blocks from Format_Payload
  } src_sel_e;

  // Multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Affine transform of the AES S-box applied to an inverse b.
  function automatic byte_t sbox_affine(byte_t b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^
           {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // MixColumns on one column {b0,b1,b2,b3}, b0 in the top byte.
  function automatic logic [31:0] mix_column(logic [31:0] col);
    byte_t a0 = col[31:24], a1 = col[23:16], a2 = col[15:8], a3 = col[7:0];
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // ShiftRows: row r of the state rotates left by r columns.
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = s[127 - 8*(4*((c + r) % 4) + r) -: 8];
    return o;
  endfunction

  // Round constant of round r (1..10).
  function automatic byte_t rcon_of(int unsigned r);
    byte_t v = 8'h01;
    for (int unsigned i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

endpackage
