// tb_uart_rx: drives 8N1 frames onto the line from the testbench (with a small
// bit-rate error in some of them) and checks the received bytes, that a frame
// with a low stop bit raises `frame_err` instead of `valid`, and that a short
// glitch on the idle line produces nothing.
module tb_uart_rx;
  localparam int unsigned CPB = 32;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic rx = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .data, .valid, .frame_err);

  always @(posedge clk) begin
    if (valid) begin n_valid++; last = data; end
    if (frame_err) n_err++;
  end

  task automatic send(input logic [7:0] b, input bit stop, input int bit_len);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (bit_len) @(negedge clk);
    end
    rx = 1;
    repeat (2 * CPB) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic int v0 = n_valid;
      send(b, 1'b1, (n % 3 == 0) ? CPB + 1 : CPB);
      checks++;
      if (n_valid != v0 + 1 || last != b) begin
        failures++; $display("FAIL byte %h received as %h (%0d)", b, last, n_valid - v0);
      end
    end
    begin
      automatic int v0 = n_valid;
      send(8'h5A, 1'b0, CPB);
      checks++;
      if (n_err != 1 || n_valid != v0) begin failures++; $display("FAIL framing error"); end
      rx = 0;
      repeat (3) @(negedge clk);
      rx = 1;
      repeat (4 * CPB) @(negedge clk);
      checks++;
      if (n_err != 1 || n_valid != v0) begin failures++; $display("FAIL glitch taken as data"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
