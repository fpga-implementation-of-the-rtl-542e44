// tb_key_expander: for each key length, requests every round key in ascending
// order (as the cipher does), then reloads and requests them in descending
// order (as the inverse cipher does), and finally in a scattered order,
// comparing each with the full key schedule of the reference model. Also
// checks the FIPS-197 Appendix A last round keys and that an ascending
// request needs at most one SubWord (131 cycles) plus a few cycles per word.
module tb_key_expander;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic       load = 0, req = 0;
  key_len_e   key_len = KEY128;
  key_t       key = '0;
  logic [3:0] round = 0;
  logic       busy, rk_valid;
  block_t     rk;
  int checks = 0, failures = 0;

  key_expander dut (.clk, .rst_n, .load, .key_len, .key, .req, .round,
                    .busy, .rk_valid, .round_key(rk));

  task automatic do_load(input key_len_e kl, input key_t k);
    @(negedge clk);
    key_len = kl; key = k; load = 1;
    @(negedge clk);
    load = 0; key = '0;
  endtask

  task automatic get(input int r, input block_t want, input int max_cyc, input string tag);
    int cyc = 0;
    @(negedge clk);
    round = 4'(r); req = 1;
    @(negedge clk);
    req = 0;
    cyc = 1;
    while (!rk_valid && cyc < 10000) begin @(negedge clk); cyc++; end
    checks++;
    if (rk != want || cyc > max_cyc) begin
      failures++;
      $display("FAIL %s round %0d: %h after %0d cycles, expected %h", tag, r, rk, cyc, want);
    end
  endtask

  initial begin
    key_t fips;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fips = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    for (int n = 0; n < 9; n++) begin
      automatic key_len_e kl = key_len_e'(n % 3);
      automatic int nk = key_words(kl), nr = nk + 6;
      automatic key_t k = (n < 3) ? fips : {$urandom, $urandom, $urandom, $urandom,
                                  $urandom, $urandom, $urandom, $urandom};
      if (nk == 4) k[127:0] = '0;
      if (nk == 6) k[63:0] = '0;
      do_load(kl, k);
      for (int r = 0; r <= nr; r++)
        get(r, round_key(k, nk, r), 131 + 4 * 8, $sformatf("asc nk=%0d", nk));
      do_load(kl, k);
      for (int r = nr; r >= 0; r--)
        get(r, round_key(k, nk, r), 20000, $sformatf("desc nk=%0d", nk));
      for (int m = 0; m < 6; m++) begin
        automatic int r = $urandom_range(0, nr);
        get(r, round_key(k, nk, r), 20000, $sformatf("rand nk=%0d", nk));
      end
    end
    // FIPS-197 Appendix A.1 last round key for the 128-bit key.
    do_load(KEY128, 256'h2b7e151628aed2a6abf7158809cf4f3c << 128);
    get(10, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, 20000, "fips A.1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
