// lfsr_rev: LFSR II, the LFSR of m'(x) = x^8+x^4+x^3+x^2+1 run backwards.
//
// Each enabled clock multiplies the state by x^-1 modulo m'(x), undoing one
// step of LFSR I: the register shifts one place towards stage 1, stage 1
// feeds back into stage 8, and it is also added into stages 2, 3 and 4
// (bits 1, 2 and 3), one place below the forward taps. Started from the same
// seed 1, after t steps the state is s(-t) = s(255 - t). The stage order and
// tap positions follow the lower LFSR of the published schematic; the load and
// enable inputs are this design's own.
//
// Interface: `load` (priority) sets the state to SEED, `en` advances it by
// one step; `q` is the registered state. One step per clock.
module lfsr_rev
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

  // Taps of the reverse direction: the forward taps moved down one stage,
  // with the constant term of m'(x) becoming the feedback into stage 8.
  localparam byte_t RPOLY = {1'b1, POLY[7:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (load) q <= SEED;
    else if (en)   q <= {1'b0, q[7:1]} ^ (q[0] ? RPOLY : 8'h00);
  end

endmodule
