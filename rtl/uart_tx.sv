// uart_tx: UART transmitter, 8 data bits, no parity, 1 stop bit, LSB first.
//
// A byte offered on `data` with `valid` is taken when `ready` is high; the
// line then carries a start bit (0), the eight data bits and a stop bit (1),
// each CLKS_PER_BIT clocks long. The line idles high. The published design only says
// that UART carries the data; the frame format, the clock rate (the 50 MHz
// oscillator of the DE10-Lite board) and the 115200 baud rate are this
// design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434     // 50 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    shreg;     // stop bit and data[7:0], sent from bit 0
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign ready = (bits_left == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      tx        <= 1'b1;
    end else if (ready) begin
      tx <= 1'b1;
      if (valid) begin
        shreg     <= {1'b1, data};
        bits_left <= 4'd10;
        cnt       <= '0;
        tx        <= 1'b0;
      end
    end else begin
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt       <= '0;
        bits_left <= bits_left - 4'd1;
        shreg     <= {1'b1, shreg[8:1]};
        tx        <= (bits_left == 4'd1) ? 1'b1 : shreg[0];
      end else begin
        cnt <= cnt + CW'(1);
      end
    end
  end

endmodule
