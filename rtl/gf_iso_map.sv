// gf_iso_map: the isomorphism mapping (and inverse isomorphism mapping) of the
// LFSR S-box.
//
// The AES field is GF(2^8) modulo m(x) = x^8+x^4+x^3+x+1; the LFSRs work
// modulo m'(x) = x^8+x^4+x^3+x^2+1. The element x+1 (0x03) of the AES field
// is a root of m'(x), so sending x to x+1 is a field isomorphism. It is the
// linear map that turns bit i of the input into (x+1)^i, i.e. the 8x8 binary
// matrix whose columns are 01, 03, 05, 0F, 11, 33, 55, FF. That matrix is its
// own inverse, so the same block does the forward mapping in front of the
// LFSR inverter and the inverse mapping behind it. The two mapping boxes come
// from the published block diagram; the choice of root and the matrix are this
// design's own, since the diagram only names them.
//
// Interface: purely combinational, `a` in, `y` out.
module gf_iso_map
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  assign y = iso_map(a);

endmodule
