// lfsr_sbox: AES S-box and inverse S-box built around the LFSR inverter.
//
// Forward (inv = 0): the byte is mapped into the m'(x) field by the
// isomorphism mapping, inverted there by the two-LFSR search, mapped back, and
// put through the AES affine transformation. Inverse (inv = 1): the inverse
// affine transformation comes first, then the same mapping, inversion and
// mapping back. The chain follows the published S-box diagram and the text's
// "multiplicative inverse, then affine transformation"; the shared datapath
// for both directions and the handshake are this design's own.
//
// Interface and timing: pulse `start` with `din` and `inv` valid while `busy`
// is low; `done` pulses when `dout` is valid, 1 to 129 cycles later depending
// on the byte (see lfsr_inverter). `dout` is a combinational function of the
// inverter's registered result and holds until the next start.
module lfsr_sbox
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  inv,
  input  byte_t din,
  output logic  busy,
  output logic  done,
  output byte_t dout
);

  logic  inv_q;
  byte_t pre, a_iso, y_iso, y_aes;

  assign pre = inv ? inv_affine(din) : din;

  gf_iso_map u_iso     (.a(pre),   .y(a_iso));
  lfsr_inverter u_inv  (.clk, .rst_n, .start, .a(a_iso), .busy, .done, .y(y_iso));
  gf_iso_map u_iso_inv (.a(y_iso), .y(y_aes));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               inv_q <= 1'b0;
    else if (start && !busy)  inv_q <= inv;
  end

  assign dout = inv_q ? y_aes : affine(y_aes);

endmodule
