// sub_bytes: SubBytes / InvSubBytes over LANES bytes with one LFSR S-box per
// byte.
//
// All lanes start together; each lane's LFSR search takes a different number
// of cycles, so a mask records which lanes have finished and `done` pulses one
// cycle after the last one. With the default 16 lanes it substitutes a whole
// AES state; the key expansion uses 4 lanes for SubWord. One S-box unit per
// byte is this design's reading of the published design, which shows a single S-box
// unit and does not say how many work in parallel.
//
// Interface and timing: pulse `start` with `din` and `inv` valid while `busy`
// is low; `done` pulses 2 to 130 cycles later with `dout` valid. `dout` holds
// until the next start. Byte k of `din` is bits [8*LANES-1-8*k -: 8].
module sub_bytes
  import aes_pkg::*;
#(
  parameter int unsigned LANES = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 inv,
  input  logic [8*LANES-1:0]   din,
  output logic                 busy,
  output logic                 done,
  output logic [8*LANES-1:0]   dout
);

  logic [LANES-1:0] lane_done, lane_busy, finished;
  logic             go;

  assign go = start && !busy;

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    lfsr_sbox u_sbox (
      .clk, .rst_n,
      .start(go),
      .inv,
      .din  (din[8*LANES-1-8*k -: 8]),
      .busy (lane_busy[k]),
      .done (lane_done[k]),
      .dout (dout[8*LANES-1-8*k -: 8])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      finished <= '0;
    end else begin
      done <= 1'b0;
      if (go) begin
        busy     <= 1'b1;
        finished <= '0;
      end else if (busy) begin
        if (&(finished | lane_done)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        finished <= finished | lane_done;
      end
    end
  end

  // A lane can only be searching while the whole unit is busy.
  a_lanes_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 !busy |-> lane_busy == '0);

endmodule
