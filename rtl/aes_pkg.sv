// aes_pkg: types, constants and small GF(2^8) helper functions shared by the
// AES blocks.
//
// Byte order follows the usual AES convention: a 128-bit block carries byte 0
// in bits [127:120], byte 15 in bits [7:0], and the state is filled column by
// column, so state[row][col] is byte (row + 4*col). A 256-bit key port is
// left-justified: the first key byte sits in bits [255:248], and a 128-bit key
// only uses the upper 128 bits.
//
// Two representations of GF(2^8) are used. The cipher works modulo
// m(x) = x^8+x^4+x^3+x+1 (0x11B); the LFSRs that find the multiplicative
// inverse work modulo the primitive polynomial m'(x) = x^8+x^4+x^3+x^2+1
// (0x11D). The isomorphism between the two sends bit i of a byte to the
// polynomial (x+1)^i, whose degree stays below 8 for i < 8 so no reduction is
// needed; (x+1) is a root of m'(x) in the AES field and the map happens to be
// its own inverse, so one function serves both directions.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [255:0] key_t;

  // Key length, chosen per operation.
  typedef enum logic [1:0] {
    KEY128 = 2'd0,
    KEY192 = 2'd1,
    KEY256 = 2'd2
  } key_len_e;

  // Low byte of m'(x) = x^8+x^4+x^3+x^2+1, the LFSR feedback taps.
  localparam byte_t LFSR_POLY = 8'h1D;
  // Seed of both LFSRs, s(0) = 1.
  localparam byte_t LFSR_SEED = 8'h01;
  // Largest number of LFSR steps needed to find an inverse: the two LFSRs
  // together cover the 255 non-zero elements in (2^8 - 1 - 1) / 2 = 127 steps.
  localparam int unsigned LFSR_MAX_STEPS = 127;

  // Number of 32-bit key words, Nk.
  function automatic int unsigned key_words(key_len_e kl);
    case (kl)
      KEY192:  return 6;
      KEY256:  return 8;
      default: return 4;
    endcase
  endfunction

  // Number of rounds, Nr = Nk + 6.
  function automatic int unsigned num_rounds(key_len_e kl);
    return key_words(kl) + 6;
  endfunction

  // Multiply by x modulo m(x).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // General multiplication modulo m(x).
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t r = '0;
    byte_t p = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= p;
      p = xtime(p);
    end
    return r;
  endfunction

  // Isomorphism between the m(x) and m'(x) representations (self-inverse):
  // bit i of the input contributes (x+1)^i.
  function automatic byte_t iso_map(byte_t a);
    byte_t r = '0;
    byte_t col = 8'h01;
    for (int i = 0; i < 8; i++) begin
      if (a[i]) r ^= col;
      col = col ^ {col[6:0], 1'b0};   // col * (x+1), degree stays below 8
    end
    return r;
  endfunction

  // AES affine transformation (FIPS-197 5.1.1).
  function automatic byte_t affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // Inverse of the affine transformation.
  function automatic byte_t inv_affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

  // Round constant Rcon[k] = x^(k-1) modulo m(x), k >= 1.
  function automatic byte_t rcon(int unsigned k);
    byte_t r = 8'h01;
    for (int i = 1; i < 11; i++)
      if (i < k) r = xtime(r);
    return r;
  endfunction

  // Byte b (0..15) of a block.
  function automatic byte_t blk_byte(block_t s, int unsigned b);
    return s[127 - 8*b -: 8];
  endfunction

endpackage
