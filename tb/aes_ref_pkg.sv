// aes_ref_pkg: plain software model of AES used by the testbenches as the
// reference. It follows FIPS-197 directly: the S-box is a^254 (the field
// inverse by exponentiation) followed by the affine map written with byte
// rotations, the key schedule is expanded in full, and the cipher and inverse
// cipher work on a 4x4 byte array. Nothing here uses LFSRs or the window of
// the hardware key expander.
package aes_ref_pkg;

  typedef logic [7:0] u8;

  function automatic u8 mul(u8 a, u8 b);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1B) : (a << 1);
    end
    return r;
  endfunction

  function automatic u8 finv(u8 a);      // a^254, 0 -> 0
    u8 r = 1;
    for (int i = 0; i < 254; i++) r = mul(r, a);
    return r;
  endfunction

  function automatic u8 rotl(u8 b, int n);
    return u8'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic u8 sbox_calc(u8 a);
    u8 b = finv(a);
    return b ^ rotl(b, 1) ^ rotl(b, 2) ^ rotl(b, 3) ^ rotl(b, 4) ^ 8'h63;
  endfunction

  // Tables filled on first use.
  u8  sb_tbl [256];
  u8  isb_tbl [256];
  bit tbl_ok = 1'b0;

  function automatic void fill_tables();
    for (int x = 0; x < 256; x++) begin
      sb_tbl[x] = sbox_calc(u8'(x));
      isb_tbl[sb_tbl[x]] = u8'(x);
    end
    tbl_ok = 1'b1;
  endfunction

  function automatic u8 sbox(u8 a);
    if (!tbl_ok) fill_tables();
    return sb_tbl[a];
  endfunction

  function automatic u8 inv_sbox(u8 a);
    if (!tbl_ok) fill_tables();
    return isb_tbl[a];
  endfunction

  // Full key schedule; nk = 4, 6 or 8; key left-justified in 256 bits.
  function automatic void expand(input logic [255:0] key, input int nk,
                                 output logic [31:0] w [60]);
    logic [31:0] t;
    u8 rc = 1;
    for (int i = 0; i < 60; i++) w[i] = 0;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < 4 * (nk + 7); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end else if (nk == 8 && i % 8 == 4) begin
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
  endfunction

  function automatic logic [127:0] round_key(input logic [255:0] key, input int nk, input int r);
    logic [31:0] w [60];
    expand(key, nk, w);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  typedef u8 st_t [4][4];

  function automatic st_t to_st(logic [127:0] b);
    st_t s;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(r + 4*c) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] b;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[127 - 8*(r + 4*c) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] b, bit inv);
    st_t s = to_st(b), o;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      if (inv) o[r][(c + r) % 4] = s[r][c];
      else     o[r][c] = s[r][(c + r) % 4];
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] b, bit inv);
    st_t s = to_st(b), o;
    u8 m [4] = inv ? '{8'h0E, 8'h0B, 8'h0D, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) begin
      o[r][c] = 0;
      for (int k = 0; k < 4; k++) o[r][c] ^= mul(m[(k - r + 4) % 4], s[k][c]);
    end
    return from_st(o);
  endfunction

  function automatic logic [127:0] sub_all(logic [127:0] b, bit inv);
    for (int k = 0; k < 16; k++) b[8*k +: 8] = inv ? inv_sbox(b[8*k +: 8]) : sbox(b[8*k +: 8]);
    return b;
  endfunction

  function automatic logic [127:0] encrypt(input logic [255:0] key, input int nk,
                                           input logic [127:0] pt);
    logic [31:0] w [60];
    logic [127:0] s;
    int nr = nk + 6;
    expand(key, nk, w);
    s = pt ^ {w[0], w[1], w[2], w[3]};
    for (int r = 1; r <= nr; r++) begin
      s = ref_shift_rows(sub_all(s, 0), 0);
      if (r != nr) s = ref_mix_columns(s, 0);
      s ^= {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(input logic [255:0] key, input int nk,
                                           input logic [127:0] ct);
    logic [31:0] w [60];
    logic [127:0] s;
    int nr = nk + 6;
    expand(key, nk, w);
    s = ct ^ {w[4*nr], w[4*nr+1], w[4*nr+2], w[4*nr+3]};
    for (int r = nr - 1; r >= 0; r--) begin
      s = sub_all(ref_shift_rows(s, 1), 1);
      s ^= {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

endpackage
