// tb_aes_lfsr_system: end-to-end test of the two-board link at its default
// settings (115200 baud at a 50 MHz clock).
//
// The testbench plays the host PC: it sends job frames on the serial line
// into the encrypting board, decodes the board-to-board line to check the
// forwarded key and the ciphertext against the software reference, and
// decodes the line back to the host to check that the plaintext returns
// unchanged. Jobs cover AES-128/192/256 (FIPS-197 keys and random ones), a
// plaintext with zero bytes, a bad header byte, a character with a broken
// stop bit, and a frame sent while the encrypting board is still busy, which
// must be dropped and flagged. It also counts, inside the design, searches
// ended by each of the two LFSR comparators and backward steps of the
// decryptor's key expander; each mechanism must occur at least once.
module tb_aes_lfsr_system;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned CPB = 434;      // the design's default bit time

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #10 clk = ~clk;                  // 50 MHz

  logic       host_rx = 1'b1;
  logic       host_tx, link;
  logic [1:0] busy, overrun, bad_header, line_err;

  aes_lfsr_system dut (.clk, .rst_n, .host_rx, .host_tx, .link,
                       .busy, .overrun, .bad_header, .line_err);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- host side serial driver ----
  task automatic send_byte(input logic [7:0] b, input bit bad_stop = 1'b0);
    logic [9:0] f = {~bad_stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      host_rx = f[i];
      repeat (CPB) @(posedge clk);
    end
    host_rx = 1'b1;
    if (bad_stop) repeat (CPB) @(posedge clk);   // let the line idle again
  endtask

  task automatic send_frame(input key_len_e kl, input key_t k, input block_t blk);
    int kb = 4 * key_words(kl);
    send_byte(8'(kb));
    for (int i = 0; i < kb; i++) send_byte(k[255 - 8*i -: 8]);
    for (int i = 0; i < 16; i++) send_byte(blk[127 - 8*i -: 8]);
  endtask

  // ---- serial monitors ----
  logic [7:0] link_q [$];
  logic [7:0] host_q [$];

  task automatic monitor(input bit which);
    forever begin
      logic [7:0] b;
      if (which) @(negedge host_tx); else @(negedge link);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = which ? host_tx : link;
      end
      repeat (CPB) @(posedge clk);              // stop bit
      if (which) host_q.push_back(b); else link_q.push_back(b);
    end
  endtask

  initial fork monitor(1'b0); monitor(1'b1); join_none

  task automatic wait_bytes(input bit which, input int n);
    int t = 0;
    while ((which ? host_q.size() : link_q.size()) < n && t < 1_500_000) begin
      @(posedge clk); t++;
    end
  endtask

  // ---- expected results ----
  task automatic expect_job(input key_len_e kl, input key_t k, input block_t pt, input string tag);
    int     kb = 4 * key_words(kl);
    block_t ct = aes_ref_pkg::encrypt(k, key_words(kl), pt);
    logic [7:0] b;
    bit ok_key = 1, ok_ct = 1, ok_pt = 1;
    wait_bytes(1'b0, kb + 17);
    check(link_q.size() >= kb + 17, {tag, ": link frame complete"});
    if (link_q.size() >= kb + 17) begin
      b = link_q.pop_front();
      check(b == 8'(kb), {tag, ": link header"});
      for (int i = 0; i < kb; i++) begin
        b = link_q.pop_front();
        if (b != k[255 - 8*i -: 8]) ok_key = 0;
      end
      for (int i = 0; i < 16; i++) begin
        b = link_q.pop_front();
        if (b != ct[127 - 8*i -: 8]) ok_ct = 0;
      end
      check(ok_key, {tag, ": key forwarded"});
      check(ok_ct, {tag, ": ciphertext"});
    end
    wait_bytes(1'b1, 16);
    check(host_q.size() >= 16, {tag, ": plaintext returned"});
    if (host_q.size() >= 16) begin
      for (int i = 0; i < 16; i++) begin
        b = host_q.pop_front();
        if (b != pt[127 - 8*i -: 8]) ok_pt = 0;
      end
      check(ok_pt, {tag, ": plaintext matches"});
    end
  endtask

  // ---- mechanism counters ----
  int n_jobs [3];
  int n_bad_header = 0, n_overrun = 0, n_line_err = 0;
  int n_hit_fwd = 0, n_hit_rev = 0, n_zero = 0, n_bwd_steps = 0;

  always @(posedge clk) if (rst_n) begin
    if (bad_header[0]) n_bad_header++;
    if (overrun[0])    n_overrun++;
    if (line_err[0])   n_line_err++;
    if (dut.u_fpga1.u_aes.u_sub.g_lane[0].u_sbox.u_inv.hit_fwd) n_hit_fwd++;
    if (dut.u_fpga1.u_aes.u_sub.g_lane[0].u_sbox.u_inv.hit_rev) n_hit_rev++;
    if (dut.u_fpga1.u_aes.u_sub.g_lane[0].u_sbox.u_inv.load &&
        dut.u_fpga1.u_aes.u_sub.g_lane[0].u_sbox.u_inv.a == 8'h00) n_zero++;
    if (dut.u_fpga2.u_aes.u_kexp.st == 2'd1 && dut.u_fpga2.u_aes.u_kexp.go_bwd &&
        !dut.u_fpga2.u_aes.u_kexp.go_fwd) n_bwd_steps++;
  end

  initial begin
    automatic key_t   fips_key = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    automatic block_t fips_pt  = 128'h00112233445566778899aabbccddeeff;
    automatic key_t   k1;
    automatic block_t p1, p2;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // The three key lengths with the FIPS-197 keys.
    send_frame(KEY128, fips_key & {{128{1'b1}}, 128'h0}, fips_pt);
    expect_job(KEY128, fips_key & {{128{1'b1}}, 128'h0}, fips_pt, "fips128");
    n_jobs[0]++;
    send_frame(KEY192, fips_key & {{192{1'b1}}, 64'h0}, fips_pt);
    expect_job(KEY192, fips_key & {{192{1'b1}}, 64'h0}, fips_pt, "fips192");
    n_jobs[1]++;
    send_frame(KEY256, fips_key, fips_pt);
    expect_job(KEY256, fips_key, fips_pt, "fips256");
    n_jobs[2]++;

    // A bad header byte and a broken character, then a good random job.
    send_byte(8'h11);
    send_byte(8'h10, 1'b1);
    k1 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, 64'h0};
    p1 = {$urandom, $urandom, $urandom, $urandom};
    send_frame(KEY192, k1, p1);
    expect_job(KEY192, k1, p1, "rand192");
    n_jobs[1]++;
    check(n_bad_header == 1, "bad header flagged once");
    check(n_line_err == 1, "broken stop bit flagged once");

    // Two frames back to back: the second arrives while the first is still
    // being sent on, so it is dropped.
    k1 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    p1 = {$urandom, $urandom, $urandom, $urandom};
    p2 = {$urandom, $urandom, $urandom, $urandom};
    fork
      begin
        send_frame(KEY256, k1, p1);
        send_frame(KEY128, k1, p2);
      end
      expect_job(KEY256, k1, p1, "rand256");
    join
    n_jobs[2]++;
    repeat (300_000) @(posedge clk);
    check(n_overrun == 1, "second frame dropped with overrun");
    check(link_q.size() == 0 && host_q.size() == 0, "nothing sent for the dropped frame");

    // Mechanisms exercised.
    check(n_jobs[0] > 0 && n_jobs[1] > 0 && n_jobs[2] > 0, "all three key lengths");
    check(n_hit_fwd > 0, "search ended by comparator on LFSR I");
    check(n_hit_rev > 0, "search ended by comparator on LFSR II");
    check(n_zero > 0, "zero byte substituted");
    check(n_bwd_steps > 0, "key expander walked backwards");
    $display("jobs 128/192/256: %0d/%0d/%0d  bad_header %0d  line_err %0d  overrun %0d",
             n_jobs[0], n_jobs[1], n_jobs[2], n_bad_header, n_line_err, n_overrun);
    $display("LFSR I hits %0d  LFSR II hits %0d  zero bytes %0d  backward key steps %0d",
             n_hit_fwd, n_hit_rev, n_zero, n_bwd_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
