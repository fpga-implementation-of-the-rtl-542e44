// tb_lfsr_inverter: feeds all 256 bytes to the two-LFSR inverter and checks
// that a * y == 1 modulo m'(x) (0 for 0), computed here with integer
// multiplication, and that the result arrives exactly 2 + min(p, 255-p)
// cycles after start, where a = x^p, so never later than 127 LFSR steps.
// It also counts matches found by each comparator.
module tb_lfsr_inverter;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic start = 0;
  logic [7:0] a = 0, y;
  logic busy, done;
  int checks = 0, failures = 0;
  int lg [256];

  lfsr_inverter dut (.clk, .rst_n, .start, .a, .busy, .done, .y);

  function automatic int gmul(int x, int z);
    int r = 0;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) r ^= x;
      x <<= 1;
      if (x & 'h100) x ^= 'h11D;
    end
    return r;
  endfunction

  initial begin
    automatic int p = 1, max_lat = 0, n_low = 0, n_high = 0;
    for (int t = 0; t < 255; t++) begin
      lg[p] = t;
      p = gmul(p, 2);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      automatic int cyc = 0, want;
      @(negedge clk);
      a = 8'(v); start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if ((v == 0 && y != 0) || (v != 0 && gmul(v, y) != 1)) begin
        failures++;
        $display("FAIL inverse of %h: %h", v, y);
      end
      want = (v == 0) ? 1 : 2 + ((lg[v] < 255 - lg[v]) ? lg[v] : 255 - lg[v]);
      checks++;
      if (cyc != want) begin
        failures++;
        $display("FAIL latency for %h: %0d cycles, expected %0d", v, cyc, want);
      end
      if (cyc > max_lat) max_lat = cyc;
      if (v != 0 && lg[v] <= 127) n_low++;
      if (v != 0 && lg[v] > 127) n_high++;
    end
    checks++;
    if (max_lat != 2 + 127) begin
      failures++;
      $display("FAIL worst case %0d cycles, expected 129", max_lat);
    end
    $display("worst latency %0d cycles; found by LFSR I %0d, by LFSR II %0d", max_lat, n_low, n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
