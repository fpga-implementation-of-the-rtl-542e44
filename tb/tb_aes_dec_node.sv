// tb_aes_dec_node: drives frames of key and ciphertext into the decrypting
// node at a short bit time and decodes its output line, which must carry the
// 16 plaintext bytes of the reference model. Covers the three key lengths, a
// bad header byte and a frame arriving while the node is busy.
module tb_aes_dec_node;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int unsigned CPB = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  logic rx = 1, tx, busy, overrun, bad_header, line_err;
  int checks = 0, failures = 0;
  int n_over = 0, n_bad = 0;
  logic [7:0] q [$];

  aes_dec_node #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .tx, .busy, .overrun,
                                          .bad_header, .line_err);

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_over++;
    if (bad_header) n_bad++;
  end

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (CPB) @(posedge clk); end
  endtask

  task automatic send_frame(input key_len_e kl, input key_t k, input block_t blk);
    int kb = 4 * key_words(kl);
    send_byte(8'(kb));
    for (int i = 0; i < kb; i++) send_byte(k[255 - 8*i -: 8]);
    for (int i = 0; i < 16; i++) send_byte(blk[127 - 8*i -: 8]);
  endtask

  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
      repeat (CPB) @(posedge clk);
      q.push_back(b);
    end
  end

  task automatic expect_frame(input key_len_e kl, input key_t k, input block_t pt);
    int kb = 4 * key_words(kl);
    block_t want = aes_ref_pkg::decrypt(k, key_words(kl), pt);
    bit ok = 1;
    int t = 0;
    while (q.size() < 16 && t < 100000) begin @(posedge clk); t++; end
    if (q.size() < 16) ok = 0;
    else begin
      for (int i = 0; i < 16; i++) if (q.pop_front() != want[127 - 8*i -: 8]) ok = 0;
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL frame for key length %0d", kb); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      automatic key_len_e kl = key_len_e'(n % 3);
      automatic key_t k = {$urandom, $urandom, $urandom, $urandom,
                           $urandom, $urandom, $urandom, $urandom};
      automatic block_t p = {$urandom, $urandom, $urandom, $urandom};
      if (kl == KEY128) k[127:0] = '0;
      if (kl == KEY192) k[63:0] = '0;
      if (n == 1) send_byte(8'h07);
      send_frame(kl, k, p);
      expect_frame(kl, k, p);
    end
    begin
      automatic key_t k = {8{$urandom}};
      automatic block_t p = {4{$urandom}};
      fork
        begin send_frame(KEY256, k, p); send_frame(KEY128, k, p); end
        expect_frame(KEY256, k, p);
      join
      repeat (60 * 10 * CPB) @(posedge clk);
    end
    checks++;
    if (n_bad != 1 || n_over != 1 || q.size() != 0) begin
      failures++; $display("FAIL bad header %0d, overrun %0d, extra bytes %0d", n_bad, n_over, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
