// tb_lfsr_sbox: runs all 256 bytes through the LFSR S-box in both directions
// and compares with the FIPS-197 S-box and inverse S-box of the reference
// model (field inverse by exponentiation, then the affine map), plus a few
// entries of the published table. Also checks the latency bound of 129 cycles.
module tb_lfsr_sbox;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic start = 0, inv = 0;
  logic [7:0] din = 0, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  lfsr_sbox dut (.clk, .rst_n, .start, .inv, .din, .busy, .done, .dout);

  task automatic run(input bit i, input logic [7:0] v, input logic [7:0] want);
    int cyc = 0;
    @(negedge clk);
    din = v; inv = i; start = 1;
    @(negedge clk);
    start = 0; din = ~v; inv = ~i;       // inputs may change after start
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (dout != want || cyc > 129) begin
      failures++;
      $display("FAIL %s(%h) = %h after %0d cycles, expected %h", i ? "InvSbox" : "Sbox",
               v, dout, cyc, want);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 8'h00, 8'h63);
    run(0, 8'h53, 8'hED);
    run(1, 8'hED, 8'h53);
    run(1, 8'h63, 8'h00);
    for (int v = 0; v < 256; v++) run(0, 8'(v), sbox(8'(v)));
    for (int v = 0; v < 256; v++) run(1, 8'(v), inv_sbox(8'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
