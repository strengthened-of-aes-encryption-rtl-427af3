// aes_pkg -- constants, types and GF(2^8) helpers shared by the AES-128 datapath.
//
// The state is held as a 128-bit vector in FIPS-197 byte order: byte 0 (the first
// input byte, row 0 / column 0) sits in bits [127:120], byte 15 in bits [7:0].
// Byte n lies in row (n % 4) and column (n / 4).
//
// The S-box tables are not typed in: gen_sbox()/gen_inv_sbox() compute them at
// elaboration from the multiplicative inverse in GF(2^8) (polynomial
// x^8+x^4+x^3+x+1) followed by the FIPS-197 affine map
//   b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i,  c = 8'h63,
// so a module that indexes the constant array gets a 256-entry ROM.
// Key length is fixed at 128 bits (Nk = 4, Nr = 10); this is a choice of this
// design, the RPFL proposal only speaks of "AES".
package aes_pkg;

  localparam int unsigned NB = 4;   // columns of the state
  localparam int unsigned NR = 10;  // rounds

  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   round_t;

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(byte_t v);
    return {v[6:0], 1'b0} ^ (v[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiply, shift-and-add.
  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse, a^254 by square-and-multiply (0 maps to 0).
  function automatic byte_t ginv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);  // 254 = 8'b1111_1110
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t affine(byte_t b);
    byte_t o;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return o ^ 8'h63;
  endfunction

  typedef byte_t sbox_t [256];

  function automatic sbox_t gen_sbox();
    sbox_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(ginv(byte_t'(i)));
    return t;
  endfunction

  function automatic sbox_t gen_inv_sbox();
    sbox_t f = gen_sbox();
    sbox_t t;
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

  // Round constants for the key schedule, indexed by round 1..10.
  function automatic byte_t rcon(round_t rnd);
    byte_t c = 8'h01;
    for (int i = 1; i < 10; i++) if (i < int'(rnd)) c = xtime(c);
    return c;
  endfunction

  // Byte n (0..15) of a state, FIPS-197 order.
  function automatic byte_t get_byte(state_t s, int n);
    return s[127 - 8*n -: 8];
  endfunction

endpackage
