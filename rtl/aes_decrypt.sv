// aes_decrypt: iterative AES-128/192/256 decryption (inverse cipher) with
// LFSR inverse S-boxes and round-wise key expansion.
//
// The state is first combined with the last round key Nr. Each following
// round, for r = Nr-1 down to 0, applies InvShiftRows, runs the 16 LFSR
// S-boxes in inverse mode while the key expander produces round key r, then
// adds the round key and applies InvMixColumns (left out for r = 0). This is
// the order of the published decryption diagram. The key expander walks the
// schedule forward once to reach the last round key and then backwards one
// round at a time, so no expanded key is ever stored; that backward walk and
// the handshake are this design's own.
//
// Interface and timing: pulse `start` while `busy` is low with `key_len`,
// `key` (the cipher key, left-justified) and `ciphertext`; `done` pulses with
// `plaintext` valid, and `plaintext` holds until the next start.
module aes_decrypt
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  key_len_e key_len,
  input  key_t     key,
  input  block_t   ciphertext,
  output logic     busy,
  output logic     done,
  output block_t   plaintext
);

  typedef enum logic [1:0] {IDLE, KEY_REQ, WAIT_KEY0, WAIT_ROUND} st_e;

  st_e        st;
  block_t     state_q;
  logic [3:0] round_q;
  logic       first_q;      // the initial AddRoundKey is still to do
  logic       key_ok, sub_ok;

  // Key expander.
  logic   kx_load, kx_req, kx_busy, kx_valid;
  block_t rk;
  assign kx_load = start && (st == IDLE);
  assign kx_req  = (st == KEY_REQ);

  key_expander u_kexp (
    .clk, .rst_n, .load(kx_load), .key_len, .key,
    .req(kx_req), .round(round_q), .busy(kx_busy), .rk_valid(kx_valid),
    .round_key(rk)
  );

  // InvShiftRows, then InvSubBytes.
  block_t isr_out, sb_out;
  logic   sb_start, sb_busy, sb_done;
  assign sb_start = (st == KEY_REQ) && !first_q;

  shift_rows #(.INVERSE(1'b1)) u_isr (.state_in(state_q), .state_out(isr_out));

  sub_bytes #(.LANES(16)) u_sub (
    .clk, .rst_n, .start(sb_start), .inv(1'b1), .din(isr_out),
    .busy(sb_busy), .done(sb_done), .dout(sb_out)
  );

  // AddRoundKey, then InvMixColumns.
  block_t ark_out, imc_out, ark0_out;
  logic   final_round;
  assign final_round = (round_q == 4'd0);

  add_round_key u_ark  (.state_in(sb_out),  .round_key(rk), .state_out(ark_out));
  mix_columns #(.INVERSE(1'b1)) u_imc (.state_in(ark_out), .state_out(imc_out));
  add_round_key u_ark0 (.state_in(state_q), .round_key(rk), .state_out(ark0_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      state_q <= '0;
      round_q <= '0;
      first_q <= 1'b0;
      key_ok  <= 1'b0;
      sub_ok  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: begin
          if (start) begin
            state_q <= ciphertext;
            round_q <= 4'(num_rounds(key_len));
            first_q <= 1'b1;
            st      <= KEY_REQ;
          end
        end
        KEY_REQ: begin
          key_ok <= 1'b0;
          sub_ok <= 1'b0;
          st     <= first_q ? WAIT_KEY0 : WAIT_ROUND;
        end
        WAIT_KEY0: begin
          if (kx_valid) begin
            state_q <= ark0_out;
            round_q <= round_q - 4'd1;
            first_q <= 1'b0;
            st      <= KEY_REQ;
          end
        end
        WAIT_ROUND: begin
          if ((key_ok || kx_valid) && (sub_ok || sb_done)) begin
            state_q <= final_round ? ark_out : imc_out;
            if (final_round) begin
              done <= 1'b1;
              st   <= IDLE;
            end else begin
              round_q <= round_q - 4'd1;
              st      <= KEY_REQ;
            end
          end else begin
            key_ok <= key_ok || kx_valid;
            sub_ok <= sub_ok || sb_done;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy      = (st != IDLE);
  assign plaintext = state_q;

  a_kexp_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n)
                                         kx_req |-> !kx_busy && !sb_busy);

endmodule
