// aes_lfsr_system: the complete two-board AES link.
//
// The host PC sends a job frame (key length in bytes, key, plaintext block)
// over UART to the encrypting board, which encrypts the block with the LFSR
// S-boxes and round-wise key expansion and passes key and ciphertext over a
// serial link to the decrypting board; that board decrypts and returns the
// plaintext to the host over UART. The chain is the published experimental
// setup. Here both boards share one clock and reset, and the board-to-board
// link is a UART of the same format, which the published design does not specify; the
// link line is brought out so the ciphertext can be observed.
//
// Interface: `host_rx` carries frames from the host into the encrypting
// board, `host_tx` carries the recovered plaintext back, `link` is the serial
// line between the boards. Status outputs are per board (index 0: encrypting,
// 1: decrypting).
module aes_lfsr_system #(
  parameter int unsigned CLKS_PER_BIT = 434     // 50 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       host_rx,
  output logic       host_tx,
  output logic       link,
  output logic [1:0] busy,
  output logic [1:0] overrun,
  output logic [1:0] bad_header,
  output logic [1:0] line_err
);

  aes_enc_node #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_fpga1 (
    .clk, .rst_n, .rx(host_rx), .tx(link),
    .busy(busy[0]), .overrun(overrun[0]), .bad_header(bad_header[0]), .line_err(line_err[0])
  );

  aes_dec_node #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_fpga2 (
    .clk, .rst_n, .rx(link), .tx(host_tx),
    .busy(busy[1]), .overrun(overrun[1]), .bad_header(bad_header[1]), .line_err(line_err[1])
  );

endmodule
