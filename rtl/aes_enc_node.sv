// aes_enc_node: the encrypting board (FPGA-I) of the two-board setup.
//
// The host sends a job frame over UART (header byte with the key length in
// bytes, the key, 16 plaintext bytes; see aes_frame_rx). The node encrypts
// the block with aes_encrypt and sends a frame of the same layout on its
// output UART, with the ciphertext in place of the plaintext, so that the
// decrypting board receives both the key and the ciphertext. The published design
// gives this flow; the frame layout and the choice of UART for the
// board-to-board link are this design's own.
//
// Interface: `rx` is the serial line from the host, `tx` the serial line to
// the decrypting board. `busy` is high from a complete frame until the last
// output byte has left; a frame arriving meanwhile is dropped and flagged on
// `overrun`. `bad_header` pulses for a header byte that is not 16, 24 or 32,
// `line_err` for a UART character with a bad stop bit.
module aes_enc_node
  import aes_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434     // 50 MHz / 115200 baud
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rx,
  output logic tx,
  output logic busy,
  output logic overrun,
  output logic bad_header,
  output logic line_err
);

  logic [7:0] rx_data;
  logic       rx_valid;
  logic       frame_valid;
  key_len_e   f_key_len;
  key_t       f_key;
  block_t     f_block;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx, .data(rx_data), .valid(rx_valid), .frame_err(line_err)
  );

  aes_frame_rx u_frame (
    .clk, .rst_n, .rx_data, .rx_valid, .frame_valid,
    .key_len(f_key_len), .key(f_key), .block(f_block), .bad_header
  );

  // Encryption.
  logic   enc_start, enc_busy, enc_done;
  block_t ct;

  typedef enum logic [1:0] {IDLE, ENCRYPT, SEND} st_e;
  st_e st;

  assign enc_start = frame_valid && (st == IDLE);

  aes_encrypt u_aes (
    .clk, .rst_n, .start(enc_start), .key_len(f_key_len), .key(f_key),
    .plaintext(f_block), .busy(enc_busy), .done(enc_done), .ciphertext(ct)
  );

  // The job's key is kept here: the frame receiver overwrites its copy as soon
  // as the next frame starts to arrive.
  key_len_e job_kl;
  key_t     job_key;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      job_kl  <= KEY128;
      job_key <= '0;
    end else if (enc_start) begin
      job_kl  <= f_key_len;
      job_key <= f_key;
    end
  end

  // Output frame: header, key bytes, ciphertext bytes.
  logic [5:0] idx, key_bytes, total;
  logic [7:0] tx_byte;
  logic       tx_valid, tx_ready;

  assign key_bytes = 6'(4 * key_words(job_kl));
  assign total     = key_bytes + 6'd17;

  always_comb begin
    if (idx == 6'd0)            tx_byte = {2'b00, key_bytes};
    else if (idx <= key_bytes)  tx_byte = job_key[255 - 8*(int'(idx) - 1) -: 8];
    else                        tx_byte = ct[127 - 8*(int'(idx) - int'(key_bytes) - 1) -: 8];
  end

  assign tx_valid = (st == SEND);

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_byte), .valid(tx_valid), .ready(tx_ready), .tx
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      idx     <= '0;
      overrun <= 1'b0;
    end else begin
      overrun <= frame_valid && (st != IDLE);
      case (st)
        IDLE:    if (frame_valid) st <= ENCRYPT;
        ENCRYPT: if (enc_done) begin
                   st  <= SEND;
                   idx <= '0;
                 end
        SEND:    if (tx_ready) begin
                   if (idx == total - 6'd1) st <= IDLE;
                   idx <= idx + 6'd1;
                 end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

  // The cipher is only started when idle, and finishes before the node
  // returns to IDLE.
  a_enc_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                     enc_start |-> !enc_busy);
  a_enc_idle_means_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                          st == IDLE |-> !enc_busy);

endmodule
