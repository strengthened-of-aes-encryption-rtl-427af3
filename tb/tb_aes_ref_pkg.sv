// tb_aes_ref_pkg -- reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: the S-box is found by searching for the
// multiplicative inverse (x * y == 1 in GF(2^8)) and applying the affine map
// as a matrix-vector product with the rotating row 8'hF1; MixColumns uses a
// general GF multiply with the coefficient matrices; ShiftRows indexes a byte
// array. State byte n is bits [127-8n -: 8], FIPS-197 order.
package tb_aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0]   b8_t;
  typedef blk_t         rks_t [11];

  function automatic b8_t gm(b8_t a, b8_t b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  b8_t sb_tab [256];
  b8_t isb_tab [256];
  bit  tab_ok = 1'b0;

  function automatic b8_t sbox_calc(b8_t x);
    b8_t inv = 8'h00;
    b8_t row = 8'hF1;
    b8_t o;
    for (int y = 1; y < 256; y++) if (gm(x, b8_t'(y)) == 8'h01) inv = b8_t'(y);
    for (int i = 0; i < 8; i++) begin
      o[i] = ^(row & inv);
      row = {row[6:0], row[7]};
    end
    return o ^ 8'h63;
  endfunction

  // Tables are filled on first use; the inverse table is the search-free
  // transpose of the forward one.
  function automatic void fill_tables();
    for (int y = 0; y < 256; y++) begin
      sb_tab[y] = sbox_calc(b8_t'(y));
      isb_tab[sb_tab[y]] = b8_t'(y);
    end
    tab_ok = 1'b1;
  endfunction

  function automatic b8_t sbox(b8_t x);
    if (!tab_ok) fill_tables();
    return sb_tab[x];
  endfunction

  function automatic b8_t inv_sbox(b8_t x);
    if (!tab_ok) fill_tables();
    return isb_tab[x];
  endfunction

  function automatic b8_t gb(blk_t s, int n); return s[127-8*n -: 8]; endfunction

  function automatic blk_t sub_bytes(blk_t s, bit inv);
    blk_t o;
    for (int n = 0; n < 16; n++) o[127-8*n -: 8] = inv ? inv_sbox(gb(s, n)) : sbox(gb(s, n));
    return o;
  endfunction

  function automatic blk_t shift_rows(blk_t s, bit inv);
    b8_t a [16];
    blk_t o;
    for (int n = 0; n < 16; n++) a[n] = gb(s, n);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = inv ? a[4*((c+4-r)%4)+r] : a[4*((c+r)%4)+r];
    return o;
  endfunction

  function automatic blk_t mix_columns(blk_t s, bit inv);
    b8_t m [4] = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        b8_t acc = 8'h00;
        for (int k = 0; k < 4; k++) acc ^= gm(m[(k - r + 4) % 4], gb(s, 4*c+k));
        o[127-8*(4*c+r) -: 8] = acc;
      end
    return o;
  endfunction

  function automatic rks_t expand(blk_t key);
    rks_t rk;
    logic [31:0] w [44];
    b8_t rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])};
        t[31:24] ^= rc;
        rc = gm(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic blk_t encrypt(blk_t key, blk_t pt);
    rks_t rk = expand(key);
    blk_t s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t key, blk_t ct);
    rks_t rk = expand(key);
    blk_t s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

endpackage
