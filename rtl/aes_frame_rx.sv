// aes_frame_rx: collects one AES job from a stream of received UART bytes.
//
// A job frame is: one header byte giving the key length in bytes (16, 24 or
// 32), the key bytes in order, then the 16 bytes of the data block. When the
// last data byte arrives `frame_valid` pulses for one cycle with `key_len`,
// `key` (left-justified, unused low bytes zero) and `block` valid; they hold
// until the next frame completes. A header byte with any other value is
// dropped and counted on `bad_header`. The frame layout is this design's own;
// the published design only says that the key and the plain text are sent over UART.
module aes_frame_rx
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       frame_valid,
  output key_len_e   key_len,
  output key_t       key,
  output block_t     block,
  output logic       bad_header
);

  typedef enum logic [1:0] {HEADER, KEY, DATA} st_e;

  st_e        st;
  logic [5:0] cnt;          // bytes still expected in the current field
  logic [5:0] key_bytes;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= HEADER;
      cnt         <= '0;
      key_bytes   <= 6'd16;
      key_len     <= KEY128;
      key         <= '0;
      block       <= '0;
      frame_valid <= 1'b0;
      bad_header  <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      bad_header  <= 1'b0;
      if (rx_valid) begin
        case (st)
          HEADER: begin
            st  <= KEY;
            key <= '0;
            case (rx_data)
              8'd16: begin key_len <= KEY128; key_bytes <= 6'd16; cnt <= 6'd16; end
              8'd24: begin key_len <= KEY192; key_bytes <= 6'd24; cnt <= 6'd24; end
              8'd32: begin key_len <= KEY256; key_bytes <= 6'd32; cnt <= 6'd32; end
              default: begin st <= HEADER; bad_header <= 1'b1; end
            endcase
          end
          KEY: begin
            key[255 - 8*(int'(key_bytes) - int'(cnt)) -: 8] <= rx_data;
            cnt <= cnt - 6'd1;
            if (cnt == 6'd1) begin
              st  <= DATA;
              cnt <= 6'd16;
            end
          end
          DATA: begin
            block <= {block[119:0], rx_data};
            cnt   <= cnt - 6'd1;
            if (cnt == 6'd1) begin
              st          <= HEADER;
              frame_valid <= 1'b1;
            end
          end
          default: st <= HEADER;
        endcase
      end
    end
  end

endmodule
