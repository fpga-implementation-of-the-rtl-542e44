// tb_aes_encrypt: checks aes_encrypt against the FIPS-197 example vectors for
// all three key lengths and against the software reference model for random
// keys and blocks, and checks the block latency against the bound of
// Nr rounds of at most 127 LFSR steps each.
module tb_aes_encrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic     start = 0;
  key_len_e key_len = KEY128;
  key_t     key = '0;
  block_t   pt = '0, ct;
  logic     busy, done;
  int       checks = 0, failures = 0;

  aes_encrypt dut (.clk, .rst_n, .start, .key_len, .key, .plaintext(pt),
                   .busy, .done, .ciphertext(ct));

  task automatic run(input key_len_e kl, input key_t k, input block_t p,
                     input block_t expect_ct, input string tag);
    int cyc = 0;
    int nr = num_rounds(kl);
    @(negedge clk);
    key_len = kl; key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (ct !== expect_ct) begin
      failures++;
      $display("FAIL %s: ct=%h expected %h", tag, ct, expect_ct);
    end
    $display("%s: %0d cycles", tag, cyc);
    // Latency: each round costs at most 127 steps + a few handshake cycles.
    checks++;
    if (cyc > nr * (LFSR_MAX_STEPS + 8) + 140 || cyc < nr * 3) begin
      failures++;
      $display("FAIL %s: latency %0d cycles out of range", tag, cyc);
    end
  endtask

  initial begin
    automatic block_t fips_pt = 128'h00112233445566778899aabbccddeeff;
    automatic key_t   fips_key = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(KEY128, fips_key, fips_pt, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "fips128");
    run(KEY192, fips_key, fips_pt, 128'hdda97ca4864cdfe06eaf70a0ec0d7191, "fips192");
    run(KEY256, fips_key, fips_pt, 128'h8ea2b7ca516745bfeafc49904b496089, "fips256");
    run(KEY128, 256'h2b7e151628aed2a6abf7158809cf4f3c << 128,
        128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32, "fips_appB");
    for (int n = 0; n < 6; n++) begin
      automatic key_t     k = {$urandom, $urandom, $urandom, $urandom,
                               $urandom, $urandom, $urandom, $urandom};
      automatic block_t   p = {$urandom, $urandom, $urandom, $urandom};
      automatic key_len_e kl = key_len_e'(n % 3);
      automatic int       nk = key_words(kl);
      if (kl == KEY128) k[127:0] = '0;
      if (kl == KEY192) k[63:0] = '0;
      run(kl, k, p, aes_ref_pkg::encrypt(k, nk, p), $sformatf("rand%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
