// tb_sub_bytes: substitutes random 16-byte states (and one with every byte
// zero) in both directions and compares each byte with the reference S-box;
// checks that `done` comes once, no later than 130 cycles after start.
module tb_sub_bytes;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic start = 0, inv = 0;
  logic [127:0] din = 0, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  sub_bytes #(.LANES(16)) dut (.clk, .rst_n, .start, .inv, .din, .busy, .done, .dout);

  task automatic run(input bit i, input logic [127:0] v);
    int cyc = 0, ndone = 0;
    logic [127:0] want = sub_all(v, i);
    @(negedge clk);
    din = v; inv = i; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    repeat (5) begin @(negedge clk); if (done) ndone++; end
    checks++;
    if (dout != want || cyc > 130 || ndone != 0 || busy) begin
      failures++;
      $display("FAIL inv=%0d %h -> %h (%0d cycles), expected %h", i, v, dout, cyc, want);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, '0);
    run(1, 128'h63636363636363636363636363636363);
    for (int n = 0; n < 20; n++)
      run(n % 2, {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
