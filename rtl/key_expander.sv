// key_expander: round-wise AES key expansion for 128-, 192- and 256-bit keys.
//
// Instead of expanding the whole key schedule (44, 52 or 60 words) up front,
// only a window of the last Nk words w[j-Nk .. j-1] is kept (at most 8 words,
// 256 bits). A request for round r makes the block slide the window until it
// covers the round key w[4r .. 4r+3], then `rk_valid` pulses and `round_key`
// shows the key. Sliding forward computes the next word with the usual rule
//   w[i] = w[i-Nk] ^ w[i-1]                    if i mod Nk != 0
//   w[i] = w[i-Nk] ^ SubWord(RotWord(w[i-1])) ^ Rcon[i/Nk]   if i mod Nk == 0
//   w[i] = w[i-Nk] ^ SubWord(w[i-1])           if Nk = 8 and i mod 8 == 4
// which is the published round-wise generation. Sliding backward applies the
// same rule solved for w[i-Nk], so the decryptor can walk from the last round
// key down to the first without storing the schedule; the backward direction
// is this design's own addition, as the published design only describes generation in
// the forward direction. SubWord uses four LFSR S-boxes, so a word that needs
// it costs up to 131 cycles and any other word one cycle.
//
// Interface: pulse `load` (while idle) with `key_len` and `key` (left-justified,
// first key byte in bits [255:248]) to restart from the cipher key. Pulse
// `req` with `round` (0..Nr) while idle; `busy` is high while the window moves;
// `rk_valid` pulses when `round_key` is valid, and it stays valid until the
// next load or req. A request for a round already covered answers in 2 cycles.
module key_expander
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  key_len_e key_len,
  input  key_t     key,
  input  logic     req,
  input  logic [3:0] round,
  output logic     busy,
  output logic     rk_valid,
  output block_t   round_key
);

  typedef enum logic [1:0] {IDLE, DECIDE, SUB_WAIT} st_e;

  st_e        st;
  key_len_e   kl;
  word_t      win [8];      // win[0] = w[j-Nk] ... win[Nk-1] = w[j-1]
  logic [5:0] j;            // index of the next word to generate
  logic [3:0] r_q;
  logic       dir_fwd;      // direction of the step in flight

  // Sizes for the latched key length.
  logic [3:0] nk;
  assign nk = 4'(key_words(kl));
  logic [2:0] top;          // position of w[j-1] in the window
  assign top = 3'(nk - 4'd1);

  // Where the requested round key lies relative to the window.
  logic [5:0] lo, want_lo, want_hi;
  logic       go_fwd, go_bwd;
  assign lo      = j - 6'(nk);
  assign want_lo = {r_q, 2'b00};
  assign want_hi = want_lo + 6'd3;
  assign go_fwd  = want_hi > j - 6'd1;
  assign go_bwd  = want_lo < lo;

  // Index i of the word a step produces (forward) or consumes (backward), and
  // the neighbour w[i-1] it depends on.
  logic [5:0] i_idx;
  word_t      prev;
  logic [2:0] imod;     // i mod Nk, only compared with 0 and 4
  logic [3:0] idiv;     // i / Nk, selects Rcon
  logic       need_f, need_g;

  always_comb begin
    i_idx = go_fwd ? j : j - 6'd1;
    prev  = go_fwd ? win[top] : win[top - 3'd1];
    case (kl)
      KEY192:  begin imod = 3'(i_idx % 6); idiv = 4'(i_idx / 6); end
      KEY256:  begin imod = i_idx[2:0];    idiv = 4'(i_idx[5:3]); end
      default: begin imod = {1'b0, i_idx[1:0]}; idiv = i_idx[5:2]; end
    endcase
    need_f = (imod == 3'd0);
    need_g = (kl == KEY256) && (imod == 3'd4);
  end

  // SubWord with four LFSR S-boxes.
  logic  sw_start, sw_busy, sw_done;
  word_t sw_in, sw_out;
  logic  sw_rot;        // the step in flight applies f (RotWord + Rcon)
  logic [3:0] sw_div;

  assign sw_in = need_f ? {prev[23:0], prev[31:24]} : prev;

  sub_bytes #(.LANES(4)) u_subword (
    .clk, .rst_n, .start(sw_start), .inv(1'b0), .din(sw_in),
    .busy(sw_busy), .done(sw_done), .dout(sw_out)
  );

  // The value combined with the far word: plain neighbour, f() or g().
  word_t temp_sub;
  assign temp_sub  = sw_out ^ (sw_rot ? {rcon(32'(sw_div)), 24'h0} : 32'h0);

  always_comb begin
    sw_start = 1'b0;
    if (st == DECIDE && (go_fwd || go_bwd) && (need_f || need_g)) sw_start = 1'b1;
  end

  // One step of the window: forward drops w[j-Nk] and appends w[j];
  // backward drops w[j-1] and prepends the recovered w[j-1-Nk].
  logic       step_fwd;
  word_t      step_t;
  word_t      win_slid [8];

  always_comb begin
    step_fwd = (st == SUB_WAIT) ? dir_fwd : go_fwd;
    step_t   = (st == SUB_WAIT) ? temp_sub : prev;
    for (int k = 0; k < 8; k++) begin
      win_slid[k] = win[k];
      if (step_fwd) begin
        if (k + 1 < int'(nk))       win_slid[k] = win[k+1];
        else if (k + 1 == int'(nk)) win_slid[k] = win[0] ^ step_t;
      end else begin
        if (k == 0)                 win_slid[k] = win[top] ^ step_t;
        else if (k < int'(nk))      win_slid[k] = win[k-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= IDLE;
      kl       <= KEY128;
      j        <= 6'd4;
      r_q      <= '0;
      dir_fwd  <= 1'b1;
      sw_rot   <= 1'b0;
      sw_div   <= '0;
      rk_valid <= 1'b0;
      for (int k = 0; k < 8; k++) win[k] <= '0;
    end else begin
      rk_valid <= 1'b0;
      case (st)
        IDLE: begin
          if (load) begin
            kl <= key_len;
            j  <= 6'(key_words(key_len));
            for (int k = 0; k < 8; k++) win[k] <= key[255 - 32*k -: 32];
          end else if (req) begin
            r_q <= round;
            st  <= DECIDE;
          end
        end
        DECIDE: begin
          if (go_fwd || go_bwd) begin
            dir_fwd <= go_fwd;
            if (need_f || need_g) begin
              sw_rot <= need_f;
              sw_div <= idiv;
              st     <= SUB_WAIT;
            end else begin
              win <= win_slid;
              j   <= go_fwd ? j + 6'd1 : j - 6'd1;
            end
          end else begin
            rk_valid <= 1'b1;
            st       <= IDLE;
          end
        end
        SUB_WAIT: begin
          if (sw_done) begin
            win <= win_slid;
            j   <= dir_fwd ? j + 6'd1 : j - 6'd1;
            st <= DECIDE;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

  // Round key w[4r .. 4r+3] from the window.
  logic [5:0] off;
  assign off = want_lo - lo;
  always_comb begin
    for (int k = 0; k < 4; k++)
      round_key[127 - 32*k -: 32] = win[3'(off + 6'(k))];
  end

  a_subword_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
                                                sw_busy |-> st == SUB_WAIT);
  a_no_req_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                        busy |-> !(req || load));

endmodule
