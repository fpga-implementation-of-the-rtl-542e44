// aes_dec_node: the decrypting board (FPGA-II) of the two-board setup.
//
// It receives the frame sent by the encrypting board (header byte with the key
// length in bytes, the key, 16 ciphertext bytes; see aes_frame_rx), decrypts
// the block with aes_decrypt and returns the 16 recovered plaintext bytes to
// the host on its output UART, first byte first. The flow is the published design's;
// the frame layout is this design's own.
//
// Interface: `rx` is the serial line from the encrypting board, `tx` the
// serial line to the host. `busy` is high from a complete frame until the
// last output byte has left; a frame arriving meanwhile is dropped and flagged
// on `overrun`. `bad_header` and `line_err` flag a bad header byte and a UART
// character with a bad stop bit.
module aes_dec_node
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

  // Decryption.
  logic   dec_start, dec_busy, dec_done;
  block_t pt;

  typedef enum logic [1:0] {IDLE, DECRYPT, SEND} st_e;
  st_e st;

  assign dec_start = frame_valid && (st == IDLE);

  aes_decrypt u_aes (
    .clk, .rst_n, .start(dec_start), .key_len(f_key_len), .key(f_key),
    .ciphertext(f_block), .busy(dec_busy), .done(dec_done), .plaintext(pt)
  );

  // Output: the 16 plaintext bytes.
  logic [3:0] idx;
  logic [7:0] tx_byte;
  logic       tx_valid, tx_ready;

  assign tx_byte  = pt[127 - 8*int'(idx) -: 8];
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
        IDLE:    if (frame_valid) st <= DECRYPT;
        DECRYPT: if (dec_done) begin
                   st  <= SEND;
                   idx <= '0;
                 end
        SEND:    if (tx_ready) begin
                   if (idx == 4'd15) st <= IDLE;
                   idx <= idx + 4'd1;
                 end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

  // The cipher is only started when idle, and finishes before the node
  // returns to IDLE.
  a_dec_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                     dec_start |-> !dec_busy);
  a_dec_idle_means_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                          st == IDLE |-> !dec_busy);

endmodule
