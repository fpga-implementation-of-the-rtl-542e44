// shift_rows: ShiftRows and, with INVERSE = 1, InvShiftRows.
//
// Row r of the state is rotated left (ShiftRows) or right (InvShiftRows) by r
// byte positions; row 0 stays. With byte b = row + 4*col, output byte
// (r, c) takes input byte (r, c + r mod 4) for the forward direction and
// (r, c - r mod 4) for the inverse. Purely combinational, and by its nature
// only a fixed permutation of wires: it costs no logic.
module shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        int src_c;
        src_c = INVERSE ? (c + 4 - r) % 4 : (c + r) % 4;
        state_out[127 - 8*(r + 4*c) -: 8] = state_in[127 - 8*(r + 4*src_c) -: 8];
      end
    end
  end

endmodule
