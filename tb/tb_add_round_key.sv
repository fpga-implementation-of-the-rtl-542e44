// tb_add_round_key: checks the FIPS-197 Appendix B initial AddRoundKey and
// random states and keys against a bytewise XOR done in the testbench.
module tb_add_round_key;
  logic [127:0] s, k, y, want;
  int checks = 0, failures = 0;

  add_round_key dut (.state_in(s), .round_key(k), .state_out(y));

  initial begin
    s = 128'h3243f6a8885a308d313198a2e0370734;
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    checks++;
    if (y != 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin
      failures++; $display("FAIL FIPS example: %h", y);
    end
    for (int n = 0; n < 100; n++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 16; b++) want[8*b +: 8] = s[8*b +: 8] ^ k[8*b +: 8];
      #1;
      checks++;
      if (y != want) begin failures++; $display("FAIL %h ^ %h = %h", s, k, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
