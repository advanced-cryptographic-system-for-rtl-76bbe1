// aes_pkg: types and GF(2^8) arithmetic shared by the AES-128 blocks.
//
// The AES state is a 128-bit vector in the byte order of FIPS-197: byte 0
// (bits 127:120) is s[0,0], byte 1 is s[1,0], byte 4 is s[0,1], so byte
// index = 4*column + row. The S-box is not stored as a table; it is computed
// as the multiplicative inverse in GF(2^8) (reduction polynomial
// x^8+x^4+x^3+x+1) followed by the affine transform, which is the S-box's
// defining formula. The inverse is taken as x^254 with a fixed chain of
// squarings (which are linear) and six multiplications, so every function
// here is plain combinational logic.
package aes_pkg;

  localparam int unsigned NR = 10;  // rounds for AES-128

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  // Multiply by x modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product by shift-and-add.
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p = '0;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  function automatic byte_t gf_sq(input byte_t a);
    return gf_mul(a, a);
  endfunction

  // a^254 = a^-1 (and 0 -> 0).
  function automatic byte_t gf_inv(input byte_t a);
    byte_t a2, a4, a8, a16, a32, a64, a128, r;
    a2   = gf_sq(a);
    a4   = gf_sq(a2);
    a8   = gf_sq(a4);
    a16  = gf_sq(a8);
    a32  = gf_sq(a16);
    a64  = gf_sq(a32);
    a128 = gf_sq(a64);
    r = gf_mul(a2, a4);
    r = gf_mul(r, a8);
    r = gf_mul(r, a16);
    r = gf_mul(r, a32);
    r = gf_mul(r, a64);
    r = gf_mul(r, a128);
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t a, input int unsigned n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  // Forward S-box: inverse, then b ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 0x63.
  function automatic byte_t sbox(input byte_t a);
    byte_t b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // Inverse S-box: inverse affine rotl1 ^ rotl3 ^ rotl6 ^ 0x05, then inverse.
  function automatic byte_t inv_sbox(input byte_t a);
    byte_t b = rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05;
    return gf_inv(b);
  endfunction

  // Byte k (0..15) of a block, FIPS-197 order.
  function automatic byte_t get_byte(input block_t s, input int unsigned k);
    return s[127 - 8*k -: 8];
  endfunction

  // One column times c(x) = {03}x^3 + {01}x^2 + {01}x + {02}.
  function automatic word_t mix_col(input word_t c);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // One column times d(x) = {0b}x^3 + {0d}x^2 + {09}x + {0e}.
  function automatic word_t inv_mix_col(input word_t c);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09),
            gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d),
            gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b),
            gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e)};
  endfunction

  // InvMixColumns of a whole block (used for the decryption round keys).
  function automatic block_t inv_mix_block(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = inv_mix_col(s[127 - 32*c -: 32]);
    return r;
  endfunction

  // Round constant for round i (1..10): x^(i-1) in GF(2^8).
  function automatic byte_t rcon(input logic [3:0] i);
    byte_t r = 8'h01;
    for (int k = 1; k < 10; k++) if (4'(k) < i) r = xtime(r);
    return r;
  endfunction

endpackage
