// mix_columns: MixColumns and, with INVERSE = 1, InvMixColumns.
//
// Each column is multiplied, as a polynomial over GF(2^8) mod m(x), by
// {03}x^3+{01}x^2+{01}x+{02} (matrix rows 02 03 01 01 rotated), or for the
// inverse by {0B}x^3+{0D}x^2+{09}x+{0E}. Purely combinational.
module mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  // First row of the circulant matrix.
  localparam byte_t M0 = INVERSE ? 8'h0E : 8'h02;
  localparam byte_t M1 = INVERSE ? 8'h0B : 8'h03;
  localparam byte_t M2 = INVERSE ? 8'h0D : 8'h01;
  localparam byte_t M3 = INVERSE ? 8'h09 : 8'h01;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      for (int r = 0; r < 4; r++) a[r] = state_in[127 - 8*(r + 4*c) -: 8];
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(r + 4*c) -: 8] = gf_mul(a[r], M0) ^ gf_mul(a[(r+1)%4], M1)
                                          ^ gf_mul(a[(r+2)%4], M2) ^ gf_mul(a[(r+3)%4], M3);
    end
  end

endmodule
