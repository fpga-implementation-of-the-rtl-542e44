// aes_encrypt: iterative AES-128/192/256 encryption with LFSR S-boxes and
// round-wise key expansion.
//
// One round is computed per iteration on a single 128-bit state register.
// After the initial AddRoundKey with round key 0, each round starts the 16
// LFSR S-boxes on the state and, at the same time, asks the key expander for
// that round's key; when both have finished, ShiftRows, MixColumns (left out
// in the last round) and AddRoundKey are applied in one cycle and the result
// is written back. The round structure, the three key lengths and their round
// counts (10, 12, 14) follow the published design; running S-boxes and key generation
// side by side and the start/done handshake are this design's own.
//
// Interface and timing: pulse `start` while `busy` is low with `key_len`,
// `key` (left-justified) and `plaintext`; `done` pulses with `ciphertext`
// valid, and `ciphertext` holds until the next start. A round takes at most
// about 130 cycles for SubBytes (key rounds that need SubWord run in
// parallel), so a block takes roughly Nr * 132 cycles in the worst case.
module aes_encrypt
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  key_len_e key_len,
  input  key_t     key,
  input  block_t   plaintext,
  output logic     busy,
  output logic     done,
  output block_t   ciphertext
);

  typedef enum logic [1:0] {IDLE, KEY_REQ, WAIT_KEY0, WAIT_ROUND} st_e;

  st_e        st;
  key_len_e   kl;
  block_t     state_q;
  logic [3:0] round_q;
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

  // SubBytes on the whole state.
  logic   sb_start, sb_busy, sb_done;
  block_t sb_out;
  assign sb_start = (st == KEY_REQ) && (round_q != 4'd0);

  sub_bytes #(.LANES(16)) u_sub (
    .clk, .rst_n, .start(sb_start), .inv(1'b0), .din(state_q),
    .busy(sb_busy), .done(sb_done), .dout(sb_out)
  );

  // ShiftRows, MixColumns, AddRoundKey.
  block_t sr_out, mc_out, mc_sel, ark_out, ark0_out;
  logic   last_round;
  assign last_round = (round_q == 4'(num_rounds(kl)));

  shift_rows    #(.INVERSE(1'b0)) u_sr  (.state_in(sb_out), .state_out(sr_out));
  mix_columns   #(.INVERSE(1'b0)) u_mc  (.state_in(sr_out), .state_out(mc_out));
  assign mc_sel = last_round ? sr_out : mc_out;
  add_round_key u_ark  (.state_in(mc_sel),  .round_key(rk), .state_out(ark_out));
  add_round_key u_ark0 (.state_in(state_q), .round_key(rk), .state_out(ark0_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      kl      <= KEY128;
      state_q <= '0;
      round_q <= '0;
      key_ok  <= 1'b0;
      sub_ok  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: begin
          if (start) begin
            kl      <= key_len;
            state_q <= plaintext;
            round_q <= '0;
            st      <= KEY_REQ;
          end
        end
        KEY_REQ: begin
          key_ok <= 1'b0;
          sub_ok <= 1'b0;
          st     <= (round_q == 4'd0) ? WAIT_KEY0 : WAIT_ROUND;
        end
        WAIT_KEY0: begin
          if (kx_valid) begin
            state_q <= ark0_out;
            round_q <= 4'd1;
            st      <= KEY_REQ;
          end
        end
        WAIT_ROUND: begin
          if ((key_ok || kx_valid) && (sub_ok || sb_done)) begin
            state_q <= ark_out;
            if (last_round) begin
              done <= 1'b1;
              st   <= IDLE;
            end else begin
              round_q <= round_q + 4'd1;
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

  assign busy       = (st != IDLE);
  assign ciphertext = state_q;

  a_kexp_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n)
                                         kx_req |-> !kx_busy && !sb_busy);

endmodule
