// lfsr_fwd: LFSR I, an 8-bit Galois LFSR for the primitive polynomial
// m'(x) = x^8+x^4+x^3+x^2+1.
//
// Each enabled clock multiplies the state by x modulo m'(x): the register
// shifts one place towards the most significant stage, the top stage feeds
// back into stage 1, and it is also added into stages 3, 4 and 5 (bits 2, 3
// and 4), which are the taps of m'(x). Started from s(0) = 1 the state after
// t steps is s(t) = x^t, and it runs through all 255 non-zero elements before
// repeating. The stage order and tap positions follow the upper LFSR of the
// published schematic; the load and enable inputs are this design's own.
//
// Interface: `load` (priority) sets the state to SEED, `en` advances it by
// one step; `q` is the registered state. One step per clock.
module lfsr_fwd
  import aes_pkg::*;
#(
  parameter byte_t SEED = LFSR_SEED,
  parameter byte_t POLY = LFSR_POLY
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  logic  en,
  output byte_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (load) q <= SEED;
    else if (en)   q <= {q[6:0], 1'b0} ^ (q[7] ? POLY : 8'h00);
  end

endmodule
