// uart_rx: UART receiver, 8 data bits, no parity, 1 stop bit, LSB first.
//
// The line is brought into the clock domain through two flip-flops. A falling
// edge starts a frame; the start bit is checked again half a bit later, and
// from there every data bit and the stop bit are sampled in the middle of
// their bit time. A good frame gives a one-cycle `valid` pulse with `data`;
// a frame whose stop bit is 0 gives a `frame_err` pulse instead. The format
// and bit rate are this design's choices (see uart_tx).
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434     // 50 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, BITS, STOP} st_e;

  st_e           st;
  logic [1:0]    sync;
  logic          rx_s;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;

  assign rx_s = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      st        <= IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (st)
        IDLE: begin
          cnt <= '0;
          if (!rx_s) st <= START;
        end
        START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            st      <= rx_s ? IDLE : BITS;   // a glitch, not a start bit
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        BITS: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            data <= {rx_s, data[7:1]};
            if (bit_idx == 3'd7) st <= STOP;
            bit_idx <= bit_idx + 3'd1;
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt <= '0;
            if (rx_s) valid     <= 1'b1;
            else      frame_err <= 1'b1;
            st <= IDLE;
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
