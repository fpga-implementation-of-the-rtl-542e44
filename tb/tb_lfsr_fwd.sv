// tb_lfsr_fwd: checks LFSR I step by step against multiplication by x modulo
// m'(x) = x^8+x^4+x^3+x^2+1 computed with integer arithmetic, checks that it
// visits all 255 non-zero states before returning to the seed, that a low
// enable holds the state and that load restores the seed.
module tb_lfsr_fwd;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic load = 0, en = 0;
  logic [7:0] q;
  int checks = 0, failures = 0;

  lfsr_fwd dut (.clk, .rst_n, .load, .en, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    automatic int expect_v = 1;
    bit seen [256];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q == 8'h01, "seed after reset");
    en = 1;
    for (int t = 1; t <= 255; t++) begin
      @(negedge clk);
      expect_v = expect_v * 2;
      if (expect_v >= 256) expect_v ^= 'h11D;
      check(q == 8'(expect_v), $sformatf("step %0d: %h expected %h", t, q, expect_v));
      if (t < 255) begin
        check(!seen[q] && q != 8'h01, $sformatf("state %h repeats early", q));
        seen[q] = 1;
      end else begin
        check(q == 8'h01, "period is 255");
      end
    end
    en = 0;
    repeat (3) @(negedge clk);
    check(q == 8'h01, "hold with enable low");
    en = 1;
    repeat (7) @(negedge clk);
    check(q == 8'h80, "x^7 after seven steps");
    load = 1;
    @(negedge clk);
    load = 0; en = 0;
    check(q == 8'h01, "load restores the seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
