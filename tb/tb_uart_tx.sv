// tb_uart_tx: sends random bytes through the transmitter and decodes the line
// in the testbench: idle high, start bit low, eight data bits LSB first and a
// high stop bit, each exactly CLKS_PER_BIT clocks, sampled mid-bit. Also
// checks that `ready` drops for the length of one frame.
module tb_uart_tx;
  localparam int unsigned CPB = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic [7:0] data = 0;
  logic valid = 0, ready, tx;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .valid, .ready, .tx);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!tx || !ready) begin failures++; $display("FAIL idle state"); end
    for (int n = 0; n < 40; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic logic [7:0] got;
      automatic int busy_cyc = 0;
      automatic bit ok = 1;
      data = b; valid = 1;
      @(posedge clk);        // accepted on this edge
      #1 valid = 0; data = ~b;
      // Start bit begins now; sample at the middle of each bit.
      repeat (CPB / 2) @(posedge clk);
      #1 if (tx !== 1'b0) ok = 0;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        #1 got[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      #1 if (tx !== 1'b1) ok = 0;
      while (!ready) begin @(posedge clk); #1 busy_cyc++; end
      checks++;
      if (!ok || got != b || busy_cyc > CPB) begin
        failures++;
        $display("FAIL byte %h: got %h, framing ok=%0d, tail %0d", b, got, ok, busy_cyc);
      end
      @(negedge clk);
    end
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
