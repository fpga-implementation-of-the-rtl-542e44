// lfsr_inverter: multiplicative inverse in GF(2^8) modulo m'(x) found with two
// LFSRs running in opposite directions.
//
// LFSR I steps forward (state s(t) = x^t) and LFSR II backward (state
// s(-t) = s(255 - t)), both from seed 1. Since s(p) * s(255 - p) = 1, when
// LFSR I equals the input a = s(p) the inverse is the current state of
// LFSR II, and when LFSR II equals the input the inverse is the current state
// of LFSR I. Two comparators watch for those matches and a multiplexer picks
// the other LFSR's state. Between them the LFSRs reach every non-zero element
// within 127 steps instead of the 254 a single LFSR would need. These blocks
// and the 127-step bound follow the published S-box diagram and text. Zero
// has no inverse; as in AES it is mapped to zero here, without running the
// LFSRs (the published design does not say how it handles zero).
//
// Interface and timing: pulse `start` with `a` valid while `busy` is low. The
// cycle after, the LFSRs hold s(0) and the comparisons begin; for an input
// s(p) the result is registered after min(p, 255-p) steps and `done` pulses
// for one cycle with `y` valid, i.e. 2 + min(p, 255-p) cycles after `start`
// (1 cycle for a = 0). `y` holds until the next start.
module lfsr_inverter
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  byte_t a,
  output logic  busy,
  output logic  done,
  output byte_t y
);

  byte_t a_q;
  byte_t s_fwd, s_rev;
  logic  load, step;
  logic  hit_fwd, hit_rev;

  lfsr_fwd u_lfsr_i (.clk, .rst_n, .load, .en(step), .q(s_fwd));
  lfsr_rev u_lfsr_ii (.clk, .rst_n, .load, .en(step), .q(s_rev));

  // Comparators.
  assign hit_fwd = busy && (s_fwd == a_q);
  assign hit_rev = busy && (s_rev == a_q);

  assign load = start && !busy;
  assign step = busy && !hit_fwd && !hit_rev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      a_q  <= '0;
      y    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q <= a;
          if (a == 8'h00) begin
            y    <= 8'h00;
            done <= 1'b1;
          end else begin
            busy <= 1'b1;
          end
        end
      end else if (hit_fwd || hit_rev) begin
        // Multiplexer: a match on one LFSR selects the other LFSR's state.
        y    <= hit_fwd ? s_rev : s_fwd;
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end

  // A non-zero input is always found; the search never outlasts 127 steps.
  logic [7:0] steps_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     steps_q <= '0;
    else if (load)  steps_q <= '0;
    else if (step)  steps_q <= steps_q + 8'd1;
  end
  a_search_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> steps_q <= 8'(LFSR_MAX_STEPS));

endmodule
