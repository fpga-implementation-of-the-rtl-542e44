// add_round_key: AddRoundKey, the XOR of the 128-bit state with a round key.
// Purely combinational; used in every round of both the cipher and the
// inverse cipher, as in the published round diagram.
module add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
