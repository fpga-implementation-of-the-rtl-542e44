// tb_lfsr_rev: checks LFSR II step by step against the sequence of LFSR I run
// backwards, computed here with integer arithmetic as a table of x^t modulo
// m'(x) = x^8+x^4+x^3+x^2+1; after t steps the state must be x^(255-t).
// Also checks hold with enable low and load.
module tb_lfsr_rev;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic load = 0, en = 0;
  logic [7:0] q;
  int checks = 0, failures = 0;
  int pw [256];

  lfsr_rev dut (.clk, .rst_n, .load, .en, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    pw[0] = 1;
    for (int t = 1; t < 256; t++) begin
      pw[t] = pw[t-1] * 2;
      if (pw[t] >= 256) pw[t] ^= 'h11D;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q == 8'h01, "seed after reset");
    en = 1;
    for (int t = 1; t <= 255; t++) begin
      @(negedge clk);
      check(q == 8'(pw[255 - t]), $sformatf("step %0d: %h expected %h", t, q, pw[255 - t]));
    end
    en = 0;
    repeat (3) @(negedge clk);
    check(q == 8'h01, "hold with enable low");
    en = 1;
    @(negedge clk);
    check(q == 8'h8E, "x^-1 = x^254 after one step");
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
